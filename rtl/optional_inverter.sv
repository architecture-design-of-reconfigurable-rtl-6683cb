// optional_inverter: produces one soft control signal of the datapath.
// A 33:1 multiplexer picks GND (select 0) or one of the 32 control tracks
// (select k = track k-1), a hard bit optionally inverts it, a register
// captures it and a ConfigDelay adds 0-3 more cycles.  A soft control bit
// that is constant for a whole application selects GND and uses the
// inverter to give a 0 or a 1.
//
// Timing: q follows the selected track 1 + cfg.dly enabled cycles later.
// The structure (multiplexer, optional inversion, register, ConfigDelay)
// follows the RaPiD control path; the GND code of the multiplexer is this
// design's choice (one more input than the 32 tracks).
module optional_inverter
  import rapid_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic [CT-1:0] tracks,
  input  oinv_cfg_t     cfg,
  output logic          q
);
  logic sel_bit, r, unused_q1;

  always_comb begin
    sel_bit = 1'b0;
    for (int k = 0; k < CT; k++)
      if (int'(cfg.sel) == k + 1) sel_bit = tracks[k];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  r <= 1'b0;
    else if (en) r <= sel_bit ^ cfg.inv;
  end

  config_delay #(.N(1)) u_dly (.clk, .rst_n, .en, .sel(cfg.dly), .d(r), .q, .q1(unused_q1));
endmodule
