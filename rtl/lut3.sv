// lut3: the configurable logic block of the control path, a 3-input
// look-up table.  Each input is taken from one of the 32 control tracks
// (5-bit hard select), the 8-entry truth table is indexed with
// {in2, in1, in0}, and the result passes a ConfigDelay of 0-3 registers.
// Combinational apart from the delay.  Size (3 inputs) and the output
// ConfigDelay follow the RaPiD control path cell; the input selection by
// 32:1 multiplexers is this design's choice.
module lut3
  import rapid_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic [CT-1:0] tracks,
  input  lut_cfg_t      cfg,
  output logic          q
);
  logic [2:0] idx;
  logic       f, unused_q1;

  always_comb begin
    for (int i = 0; i < 3; i++) idx[i] = tracks[cfg.in_sel[i]];
    f = cfg.tt[idx];
  end

  config_delay #(.N(1)) u_dly (.clk, .rst_n, .en, .sel(cfg.dly), .d(f), .q, .q1(unused_q1));
endmodule
