// rapid_top: a complete RaPiD-Benchmark array.
//
// A reconfigurable pipelined datapath: NCELLS identical cells (dp_cell),
// each with three ALUs, three 64-word RAMs, six general-purpose registers
// and a multiplier on 14 segmented data tracks, are chained into one linear
// pipeline.  Which units talk to which, and with how many pipeline
// registers, is fixed per application by the hard control held in the
// configuration memory (config_mem).  What changes every cycle (input
// multiplexer selects, ALU operations, RAM write/increment) is soft
// control, computed by a control path (cp_cell, one per datapath cell)
// from a short instruction word.  The instruction word comes from the
// instruction generator (instr_gen: four loop controllers, a synchroniser
// and an OR-merging repeater).  Data streams in and out through the stream
// manager (stream_manager): three input FIFOs drive the left end of the
// data tracks, three output FIFOs take words from the right end.
//
// The whole array advances in lock step: adv = (an instruction word is
// valid) and (no stream FIFO is empty on a read or full on a write).  When
// adv is low every pipeline register, RAM, control-path register and the
// instruction stream hold, which keeps data and control aligned.
//
// Configuration layout (cfg_addr/cfg_wdata, 16-bit words): the flat
// configuration vector is NCELLS cell_cfg_t records (cell 0 in the lowest
// bits) followed by one edge_cfg_t record.  Programs: ig_prog_* loads the
// four controllers' C-instruction stores, sm_prog_* the six address
// generators.  start begins execution; done rises when every controller
// has halted, every instruction word has been consumed and the stream
// manager has written all its output.  Timing of soft control: a bit that
// leaves the instruction generator in cycle k reaches the datapath in
// cycle k+1 plus the ConfigDelays configured along its control track.
//
// Lint reports combinational loops (UNOPTFLAT) along the chained track
// segments: a zero-delay bus connector in one cell can drive its right
// neighbour's segment while that neighbour's connector drives back.  Such
// loops close only for contradictory configurations (two connectors on one
// track driving towards each other with no register), so the warning stands.
// The configuration memory powers up cleared so that no such configuration
// exists before the first write.
module rapid_top
  import rapid_pkg::*;
#(
  parameter int NCELLS = 16,
  parameter int IW     = 16,
  parameter int NCTRL  = 4,
  parameter int CDEPTH = 32,    // C-instruction store per controller
  parameter int ADEPTH = 16,    // program store per address generator
  parameter int FDEPTH = 16,    // stream FIFO depth
  parameter int AW     = 16,    // external address width
  localparam int CW      = 16,
  localparam int NBITS   = NCELLS * CELL_CFG_BITS + $bits(edge_cfg_t),
  localparam int CFG_AW  = $clog2((NBITS + 15) / 16),
  localparam int IG_CIW  = 3 + CW + IW,
  localparam int SM_CIW  = 3 + CW + 2 * AW
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // configuration memory
  input  logic                        cfg_we,
  input  logic [CFG_AW-1:0]           cfg_addr,
  input  logic [15:0]                 cfg_wdata,
  // instruction generator programs
  input  logic                        ig_prog_we,
  input  logic [$clog2(NCTRL)-1:0]    ig_prog_sel,
  input  logic [$clog2(CDEPTH)-1:0]   ig_prog_addr,
  input  logic [IG_CIW-1:0]           ig_prog_data,
  // address generator programs
  input  logic                        sm_prog_we,
  input  logic [$clog2(2*NS)-1:0]     sm_prog_sel,
  input  logic [$clog2(ADEPTH)-1:0]   sm_prog_addr,
  input  logic [SM_CIW-1:0]           sm_prog_data,
  input  logic                        start,
  output logic                        done,
  output logic                        adv,
  output logic                        stream_halt,
  output logic                        instr_stall,
  // external memory ports
  output logic [NS-1:0]               mem_req,
  output logic [NS-1:0]               mem_we,
  output logic [NS-1:0][AW-1:0]       mem_addr,
  output logic [NS-1:0][W-1:0]        mem_wdata,
  input  logic [NS-1:0][W-1:0]        mem_rdata,
  input  logic [NS-1:0]               mem_ready
);
  logic [NBITS-1:0] cfg_flat;
  cell_cfg_t        ccfg [NCELLS];
  edge_cfg_t        ecfg;

  config_mem #(.NBITS(NBITS)) u_cfg (
    .clk, .rst_n, .we(cfg_we), .addr(cfg_addr), .wdata(cfg_wdata), .cfg(cfg_flat)
  );

  for (genvar c = 0; c < NCELLS; c++) begin : g_cfg
    assign ccfg[c] = cell_cfg_t'(cfg_flat[c*CELL_CFG_BITS +: CELL_CFG_BITS]);
  end
  assign ecfg = edge_cfg_t'(cfg_flat[NBITS-1 -: $bits(edge_cfg_t)]);

  // ---------------- instruction generator ----------------
  logic [IW-1:0] instr;
  logic          instr_valid, ig_done, sm_done;

  instr_gen #(.NCTRL(NCTRL), .IW(IW), .CW(CW), .DEPTH(CDEPTH)) u_ig (
    .clk, .rst_n, .prog_we(ig_prog_we), .prog_sel(ig_prog_sel), .prog_addr(ig_prog_addr),
    .prog_data(ig_prog_data), .start, .adv, .instr, .instr_valid, .stall(instr_stall),
    .done(ig_done)
  );

  assign adv  = instr_valid && !stream_halt;
  assign done = ig_done && sm_done;

  // ---------------- datapath and control path ----------------
  logic [NCELLS:0][T-1:0][DW-1:0] dseg;     // dseg[c]: segment left of cell c
  logic [NCELLS:0][T-1:0][DW-1:0] ddrv;     // ddrv[c]: cell c's connectors driving left
  logic [NCELLS:0][T-1:0]         ddrv_en;
  logic [NCELLS:0][CT-1:0]        cseg, cdrv, cdrv_en;
  dp_soft_t                       sc [NCELLS];
  logic [NCELLS-1:0][NALU-1:0]    status;
  logic [NS-1:0][W-1:0]           in_data, out_data;
  logic [NS-1:0]                  in_rd, out_wr;

  // left edge: input FIFOs drive the first data segments, instruction bits
  // drive the first control segments
  always_comb begin
    for (int t = 0; t < T; t++) begin
      dseg[0][t] = '0;
      for (int s = NS - 1; s >= 0; s--)
        if (ecfg.in_drv[s][t]) dseg[0][t] = {1'b0, in_data[s]};
    end
    for (int t = 0; t < CT; t++) begin
      cseg[0][t] = 1'b0;
      for (int b = 0; b < IW; b++)
        if (int'(ecfg.ib_sel[t]) == b + 1) cseg[0][t] = instr[b];
    end
  end
  assign ddrv[NCELLS]    = '0;
  assign ddrv_en[NCELLS] = '0;
  assign cdrv[NCELLS]    = '0;
  assign cdrv_en[NCELLS] = '0;

  for (genvar c = 0; c < NCELLS; c++) begin : g_cell
    dp_cell u_dp (
      .clk, .rst_n, .en(adv), .sc(sc[c]), .hc(ccfg[c].dp),
      .l_seg_in(dseg[c]), .l_drv(ddrv[c]), .l_drv_en(ddrv_en[c]),
      .r_seg_out(dseg[c+1]), .r_drv(ddrv[c+1]), .r_drv_en(ddrv_en[c+1]),
      .status(status[c])
    );
    cp_cell u_cp (
      .clk, .rst_n, .en(adv), .cfg(ccfg[c].cp),
      .l_seg_in(cseg[c]), .l_drv(cdrv[c]), .l_drv_en(cdrv_en[c]),
      .r_seg_out(cseg[c+1]), .r_drv(cdrv[c+1]), .r_drv_en(cdrv_en[c+1]),
      .status(status[c]), .sc(sc[c])
    );
  end

  // right edge: output FIFO multiplexers and stream strobes
  for (genvar s = 0; s < NS; s++) begin : g_out
    word_t ow;
    track_mux u_omux (.tracks(dseg[NCELLS]), .sel(ecfg.out_sel[s]), .y(ow));
    assign out_data[s] = ow.d;
    optional_inverter u_rd (.clk, .rst_n, .en(adv), .tracks(cseg[NCELLS]),
                            .cfg(ecfg.strm[s]), .q(in_rd[s]));
    optional_inverter u_wr (.clk, .rst_n, .en(adv), .tracks(cseg[NCELLS]),
                            .cfg(ecfg.strm[NS + s]), .q(out_wr[s]));
  end

  // ---------------- stream manager ----------------
  stream_manager #(.NS(NS), .AW(AW), .N(W), .CW(CW), .FDEPTH(FDEPTH), .PDEPTH(ADEPTH)) u_sm (
    .clk, .rst_n, .prog_we(sm_prog_we), .prog_sel(sm_prog_sel), .prog_addr(sm_prog_addr),
    .prog_data(sm_prog_data), .start, .adv, .in_rd, .in_data, .out_wr, .out_data,
    .halt(stream_halt), .done(sm_done),
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_rdata, .mem_ready
  );

  logic unused;
  assign unused = ^ddrv[0] ^ ^ddrv_en[0] ^ ^cdrv[0] ^ ^cdrv_en[0];
endmodule
