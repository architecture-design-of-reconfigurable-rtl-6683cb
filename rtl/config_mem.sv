// config_mem: the configuration memory holding all hard control of the
// array (driver enables, ConfigDelay settings, connector modes, functional
// unit modes, control-path multiplexers, LUT contents).  It is a static
// RAM of 16-bit words that can be written in any order through a simple
// write port (we, addr, wdata); every bit is continuously visible on cfg,
// word k holding cfg[16k+15:16k].  Reset clears every word, which leaves
// all bus drivers off.  The 16-bit word organisation and random-order
// writes follow the RaPiD-Benchmark; the reset value is this design's
// choice.  The memory also has a power-on value of zero (an FPGA-style
// register initial value): an arbitrary power-up configuration could close
// an inverting combinational loop through the bus drivers before reset
// arrives, and simulators then fail to settle at time zero.  Verilator
// reports this initial value as PROCASSINIT; it is intended.
module config_mem #(
  parameter int NBITS = 1024,
  localparam int NWORDS = (NBITS + 15) / 16,
  localparam int AW     = $clog2(NWORDS)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [15:0]      wdata,
  output logic [NBITS-1:0] cfg
);
  logic [NWORDS*16-1:0] bits = '0;


  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                          bits <= '0;
    else if (we && int'(addr) < NWORDS)  bits[16*addr +: 16] <= wdata;
  end

  assign cfg = bits[NBITS-1:0];
endmodule
