// bus_connector: a configurable connection between two adjacent segments of
// one track.  It is open, drives the right segment from the left one, or
// drives the left segment from the right one.  A 2:1 multiplexer picks the
// source segment (input 0 = left, 1 = right), the value passes a ConfigDelay
// of 0-3 registers, and the result goes to the driver on the far side.  The
// connector drives only the segment it is directed at (l_en / r_en), which
// the segment's priority chain then resolves.  Mode and delay are hard
// control.  Used with N=17 on data tracks and N=1 on control tracks.
// With delay 0 the connector is combinational, and lint in the assembled
// array reports loops (UNOPTFLAT) through its source multiplexer: a segment
// can reach the connector's input through other zero-delay paths.  Only a
// contradictory configuration (a zero-delay cycle) closes such a loop.
module bus_connector
  import rapid_pkg::*;
#(
  parameter int N = DW
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  bc_cfg_t      cfg,
  input  logic [N-1:0] l_in,
  input  logic [N-1:0] r_in,
  output logic [N-1:0] l_out,
  output logic         l_en,
  output logic [N-1:0] r_out,
  output logic         r_en
);
  logic [N-1:0] src, dly_q, unused_q1;

  assign src = (cfg.mode == BC_LEFT) ? r_in : l_in;

  config_delay #(.N(N)) u_dly (
    .clk, .rst_n, .en, .sel(cfg.dly), .d(src), .q(dly_q), .q1(unused_q1)
  );

  assign r_out = dly_q;
  assign l_out = dly_q;
  assign r_en  = (cfg.mode == BC_RIGHT);
  assign l_en  = (cfg.mode == BC_LEFT);
endmodule
