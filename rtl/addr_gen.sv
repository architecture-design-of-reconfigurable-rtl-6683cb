// addr_gen: the address generator of one stream.  A programmed sequencer
// (loop_sequencer) executes the stream's statically compiled addressing
// program; each INST entry carries {stride, base} as its payload and a
// count, so one C-instruction describes a whole run of addresses.  The
// repeater turns an entry into count addresses, base, base+stride,
// base+2*stride, ..., one per cycle, so more than one address per
// controller instruction is delivered on average.
//
// Program load and start as for the instruction controllers.  Output:
// addr/valid with ready handshake; done once the program has halted and
// the last address was taken.  The reuse of the controller structure and
// the stride-adding repeater follow the RaPiD stream manager; the address
// width (16 bits) and encoding are this design's choice.
module addr_gen #(
  parameter int AW    = 16,
  parameter int CW    = 16,
  parameter int DEPTH = 16,
  parameter int STACK = 4,
  localparam int PAW  = $clog2(DEPTH),
  localparam int CIW  = 3 + CW + 2 * AW
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           prog_we,
  input  logic [PAW-1:0] prog_addr,
  input  logic [CIW-1:0] prog_data,
  input  logic           start,
  output logic [AW-1:0]  addr,
  output logic           valid,
  input  logic           ready,
  output logic           done
);
  logic            v, rdy, wt, sv, take, running, halted;
  logic [2*AW-1:0] pl;
  logic [CW-1:0]   cnt, rem;
  logic [AW-1:0]   stride;
  logic            unused_sig;

  loop_sequencer #(.PW(2 * AW), .CW(CW), .DEPTH(DEPTH), .STACK(STACK), .NSIG(2)) u_seq (
    .clk, .rst_n, .prog_we, .prog_addr, .prog_data, .start,
    .out_valid(v), .out_ready(rdy), .out_payload(pl), .out_cnt(cnt), .out_wait(wt),
    .sig_valid(sv), .sig_num(unused_sig), .pending(1'b0), .take, .running, .halted
  );

  assign rdy  = !valid || (ready && rem == CW'(1));
  assign done = halted && !running && !valid && !v;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= 1'b0; addr <= '0; stride <= '0; rem <= '0;
    end else if (start) begin
      valid <= 1'b0;
    end else if (rdy && v) begin
      valid  <= 1'b1;
      addr   <= pl[AW-1:0];
      stride <= pl[2*AW-1:AW];
      rem    <= cnt;
    end else if (valid && ready) begin
      if (rem == CW'(1)) valid <= 1'b0;
      addr <= addr + stride;
      rem  <= rem - 1'b1;
    end
  end

  logic unused;
  assign unused = wt ^ sv ^ take;
endmodule
