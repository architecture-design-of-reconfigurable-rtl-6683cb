// gp_register: the general-purpose register functional unit of the
// RaPiD-Benchmark cell.  It consists only of a (T+1):1 input multiplexer and
// a ConfigDelay, so it can hold a value for 0-3 cycles, forward a value from
// a segment of one track to a segment of another, or (with select 0) output
// zero.  sel is soft control and may change every cycle; dly is hard.
// Timing: with dly = 0 the unit is a wire from track to output, so lint in
// the assembled array reports a combinational loop (UNOPTFLAT) through it
// (its output can drive a segment it reads).  Such a loop closes only in a
// configuration with no register on it, which a valid mapping never has.
// The unit's makeup follows the RaPiD-Benchmark; the GND select code is
// this design's choice.
module gp_register
  import rapid_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic [T-1:0][DW-1:0] tracks,
  input  logic [TSEL_W-1:0]   sel,
  input  logic [1:0]          dly,
  output logic [DW-1:0]       q
);
  logic [DW-1:0] d, unused_q1;

  track_mux u_mux (.tracks, .sel, .y(d));
  config_delay #(.N(DW)) u_dly (.clk, .rst_n, .en, .sel(dly), .d, .q, .q1(unused_q1));
endmodule
