// config_delay: the ConfigDelay unit placed on every functional-unit output
// and in every bus connector.  The output equals the input delayed by 0, 1,
// 2 or 3 clock cycles, chosen by two hard control bits (sel).  Three
// registers form a chain and a 4:1 multiplexer picks the tap, exactly as
// the unit is described.  The registers advance only when en is high, so a
// halted array keeps its pipeline contents; this clock-enable is this
// design's way of halting.  q1 exposes the first register, which the ALU
// uses as its accumulator.
// Setting 0 is a plain wire, so in the assembled array lint sees
// combinational loops (UNOPTFLAT) through this unit: a zero-delay output can
// drive a bus segment that feeds its own unit.  The loop closes only in a
// configuration without a register on it, which a valid mapping avoids.
module config_delay #(
  parameter int N = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [1:0]   sel,
  input  logic [N-1:0] d,
  output logic [N-1:0] q,
  output logic [N-1:0] q1
);
  logic [N-1:0] r [3];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r[0] <= '0; r[1] <= '0; r[2] <= '0;
    end else if (en) begin
      r[0] <= d;
      r[1] <= r[0];
      r[2] <= r[1];
    end
  end

  always_comb begin
    unique case (sel)
      2'd0: q = d;
      2'd1: q = r[0];
      2'd2: q = r[1];
      default: q = r[2];
    endcase
  end

  assign q1 = r[0];
endmodule
