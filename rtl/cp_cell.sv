// cp_cell: one cell of the configurable control path, running underneath a
// datapath cell.  It turns the instruction bits flowing along 32 one-bit
// control tracks, and the status bits of the cell's ALUs, into the 104 soft
// control bits of the datapath cell.
//
// Each control track has one segment per cell and a bus connector at the
// cell's left edge (drive right, drive left or open, with a ConfigDelay).
// Three 3-LUTs read the tracks and can drive any track; the three ALU
// status bits can also drive any track (hard driver enables).  Each soft
// control bit comes from an optional_inverter (GND or a track, optional
// inversion, register, ConfigDelay).  Segment drivers are resolved by the
// same daisy-chained priority as the datapath buses.
//
// Timing: every soft output is registered (one cycle after the track
// value, plus its ConfigDelay), so there is no combinational path from the
// datapath status back into the datapath.  The cell contents (32 tracks,
// 104 optional inverters, 3 3-LUTs) follow the RaPiD-Benchmark cell; one
// connector per track per cell is this design's choice.
//
// Lint reports combinational loops (UNOPTFLAT) through this cell: a LUT or
// a zero-delay bus connector reads a segment that it may also drive.  The
// paths exist in the netlist because every driver can reach every track,
// but a loop only closes for a configuration that feeds a LUT output back
// to its own input without a register, which a valid configuration never
// does; it is the same situation as the datapath buses and is left as is.
module cp_cell
  import rapid_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  cp_cfg_t       cfg,
  input  logic [CT-1:0] l_seg_in,
  output logic [CT-1:0] l_drv,
  output logic [CT-1:0] l_drv_en,
  output logic [CT-1:0] r_seg_out,
  input  logic [CT-1:0] r_drv,
  input  logic [CT-1:0] r_drv_en,
  input  logic [NALU-1:0] status,
  output dp_soft_t      sc
);
  logic [CT-1:0]    seg;
  logic [NLUT-1:0]  lut_q;
  logic [NSOFT-1:0] soft_bits;

  for (genvar k = 0; k < NLUT; k++) begin : g_lut
    lut3 u_lut (.clk, .rst_n, .en, .tracks(seg), .cfg(cfg.lut[k]), .q(lut_q[k]));
  end

  for (genvar t = 0; t < CT; t++) begin : g_trk
    logic       bl, br, blen, bren, unused_driven;
    logic [7:0] d, e;
    bus_connector #(.N(1)) u_bc (
      .clk, .rst_n, .en, .cfg(cfg.bc[t]), .l_in(l_seg_in[t]), .r_in(seg[t]),
      .l_out(bl), .l_en(blen), .r_out(br), .r_en(bren)
    );
    assign l_drv[t]    = bl;
    assign l_drv_en[t] = blen;
    always_comb begin
      d[0] = br;        e[0] = bren;
      for (int k = 0; k < NLUT; k++) begin
        d[1 + k] = lut_q[k];  e[1 + k] = cfg.lut[k].drv[t];
        d[4 + k] = status[k]; e[4 + k] = cfg.st_drv[k][t];
      end
      d[7] = r_drv[t];  e[7] = r_drv_en[t];
    end
    bus_segment #(.ND(8), .N(1)) u_seg (.d(d), .en(e), .q(seg[t]), .driven(unused_driven));
  end
  assign r_seg_out = seg;

  for (genvar s = 0; s < NSOFT; s++) begin : g_oinv
    optional_inverter u_oi (.clk, .rst_n, .en, .tracks(seg), .cfg(cfg.oinv[s]), .q(soft_bits[s]));
  end
  assign sc = dp_soft_t'(soft_bits);
endmodule
