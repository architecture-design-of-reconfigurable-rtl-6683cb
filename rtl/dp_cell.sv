// dp_cell: one RaPiD-Benchmark datapath cell.  Sixteen of them, side by
// side, form the linear datapath.
//
// Functional units, left to right:
//   GPR0 RAM0 ALU0 GPR1 RAM1 ALU1 GPR2 | MULT GPR3 GPR4 RAM2 ALU2 GPR5
// (three ALUs, three 64-word RAMs, six general-purpose registers and one
// multiplier; the order is that of the cell floorplan).  The "|" marks the
// middle of the cell, where some tracks are split.
//
// Interconnect: 14 data tracks of 17 bits (16 data + tag).
//   tracks 0-1   short segments, half a cell long (fixed breaks)
//   tracks 2-3   one segment per cell (fixed break at the cell edge)
//   tracks 4-8   one segment per cell, bus connector at the left cell edge
//   tracks 9-13  half-cell segments, bus connectors at the left cell edge
//                and in the middle of the cell
// That gives 15 bus connectors.  Each of the 20 functional-unit inputs has
// a 15:1 multiplexer (GND or a track, soft control) reading the segment of
// its half of the cell; each of the 14 outputs has one driver enable per
// track (hard control).  Segments resolve their drivers through a
// daisy-chained priority (bus_segment).  The counts (14 tracks, 20
// multiplexers, 14 outputs, 15 connectors, 104 soft and 292 hard bits)
// follow the RaPiD-Benchmark cell; which tracks are split where is this
// design's choice, since only the totals are known.
//
// Neighbour ports, per track: l_seg_in is the value of the left neighbour's
// right-hand segment; l_drv/l_drv_en is this cell's left-edge connector
// driving that segment.  r_seg_out is this cell's right-hand segment;
// r_drv/r_drv_en come from the right neighbour's left-edge connector.
// en is the array clock enable (low while the array is halted).
//
// A connector or a functional unit set to zero delay is combinational, so a
// configuration can close a loop through a segment; the static netlist
// therefore contains combinational paths from segments back to segments,
// which a valid configuration never closes.
module dp_cell
  import rapid_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  en,
  input  dp_soft_t              sc,
  input  dp_hard_t              hc,
  input  logic [T-1:0][DW-1:0]  l_seg_in,
  output logic [T-1:0][DW-1:0]  l_drv,
  output logic [T-1:0]          l_drv_en,
  output logic [T-1:0][DW-1:0]  r_seg_out,
  input  logic [T-1:0][DW-1:0]  r_drv,
  input  logic [T-1:0]          r_drv_en,
  output logic [NALU-1:0]       status
);
  // segment values seen by the left and right halves of the cell
  logic [T-1:0][DW-1:0] seg_l, seg_r;
  // functional-unit outputs and multiplexer outputs
  word_t [NOUT-1:0] fo;
  word_t [NMUX-1:0] mi;

  // ---------------- input multiplexers ----------------
  // the GP registers' multiplexers (inputs 0,5,10,13,14,19) sit inside gp_register
  localparam logic [NMUX-1:0] GPR_MUX = 20'b1000_0110_0100_0010_0001;
  for (genvar m = 0; m < NMUX; m++) begin : g_mux
    if (GPR_MUX[m]) begin : g_none
      assign mi[m] = '0;
    end else begin : g_tm
      track_mux u_mux (.tracks(m < 11 ? seg_l : seg_r), .sel(sc.mux[m]), .y(mi[m]));
    end
  end

  // ---------------- functional units ----------------
  // GP registers: outputs 0,3,6,9,10,13 ; inputs 0,5,10,13,14,19
  localparam int GPR_O [6] = '{0, 3, 6, 9, 10, 13};
  localparam int GPR_I [6] = '{0, 5, 10, 13, 14, 19};
  for (genvar g = 0; g < 6; g++) begin : g_gpr
    gp_register u_gpr (
      .clk, .rst_n, .en, .tracks(GPR_I[g] < 11 ? seg_l : seg_r), .sel(sc.mux[GPR_I[g]]),
      .dly(hc.gpr_dly[g]), .q(fo[GPR_O[g]])
    );
  end

  // RAMs: outputs 1,4,11 ; data inputs 1,6,15 ; address inputs 2,7,16
  localparam int RAM_O [3] = '{1, 4, 11};
  localparam int RAM_D [3] = '{1, 6, 15};
  localparam int RAM_A [3] = '{2, 7, 16};
  for (genvar r = 0; r < 3; r++) begin : g_ram
    local_ram #(.DEPTH(64)) u_ram (
      .clk, .rst_n, .en, .din(mi[RAM_D[r]]), .addr(mi[RAM_A[r]]), .sc(sc.ram[r]),
      .ext_addr(hc.ram_ext_addr[r]), .dout(fo[RAM_O[r]])
    );
  end

  // ALUs: outputs 2,5,12 ; a inputs 3,8,17 ; b inputs 4,9,18
  localparam int ALU_O [3] = '{2, 5, 12};
  localparam int ALU_A [3] = '{3, 8, 17};
  localparam int ALU_B [3] = '{4, 9, 18};
  for (genvar u = 0; u < NALU; u++) begin : g_alu
    rapid_alu u_alu (
      .clk, .rst_n, .en, .a(mi[ALU_A[u]]), .b(mi[ALU_B[u]]), .sc(sc.alu[u]),
      .tag_en(hc.alu_tag_en[u]), .dly(hc.alu_dly[u]), .y(fo[ALU_O[u]]), .status(status[u])
    );
  end

  // multiplier: outputs 7 (hi), 8 (lo) ; inputs 11, 12
  booth_mult u_mult (
    .clk, .rst_n, .en, .a(mi[11]), .b(mi[12]), .cfg(hc.mul),
    .dly_hi(hc.mul_dly[0]), .dly_lo(hc.mul_dly[1]), .hi(fo[7]), .lo(fo[8])
  );

  // ---------------- tracks, segments and bus connectors ----------------
  for (genvar t = 0; t < T; t++) begin : g_trk
    localparam bit HALF   = (t <= 1) || (t >= 9);     // split in the middle
    localparam bit EDGEBC = (t >= 4);                 // connector at left edge
    localparam bit MIDBC  = (t >= 9);                 // connector in the middle
    localparam int EB     = t - 4;                    // edge connector index
    localparam int MB     = t + 1;                    // middle connector index

    logic [DW-1:0] e_l, e_r, m_l, m_r;
    logic          e_len, e_ren, m_len, m_ren;

    if (EDGEBC) begin : g_ebc
      bus_connector u_bc (
        .clk, .rst_n, .en, .cfg(hc.bc[EB]), .l_in(l_seg_in[t]), .r_in(seg_l[t]),
        .l_out(e_l), .l_en(e_len), .r_out(e_r), .r_en(e_ren)
      );
    end else begin : g_noebc
      assign e_l = '0; assign e_r = '0; assign e_len = 1'b0; assign e_ren = 1'b0;
    end

    if (MIDBC) begin : g_mbc
      bus_connector u_bc (
        .clk, .rst_n, .en, .cfg(hc.bc[MB]), .l_in(seg_l[t]), .r_in(seg_r[t]),
        .l_out(m_l), .l_en(m_len), .r_out(m_r), .r_en(m_ren)
      );
    end else begin : g_nombc
      assign m_l = '0; assign m_r = '0; assign m_len = 1'b0; assign m_ren = 1'b0;
    end

    assign l_drv[t]    = e_l;
    assign l_drv_en[t] = e_len;
    assign r_seg_out[t] = seg_r[t];

    if (HALF) begin : g_half
      logic [8:0][DW-1:0] dl, dr;
      logic [8:0]         el, er;
      logic               unused_dl, unused_dr;
      for (genvar o = 0; o < 7; o++) begin : g_o
        assign dl[o] = fo[o];     assign el[o] = hc.drv[o][t];
        assign dr[o] = fo[o + 7]; assign er[o] = hc.drv[o + 7][t];
      end
      assign dl[7] = e_r;   assign el[7] = e_ren;
      assign dl[8] = m_l;   assign el[8] = m_len;
      assign dr[7] = m_r;   assign er[7] = m_ren;
      assign dr[8] = r_drv[t]; assign er[8] = r_drv_en[t] & EDGEBC;
      bus_segment #(.ND(9), .N(DW)) u_sl (.d(dl), .en(el), .q(seg_l[t]), .driven(unused_dl));
      bus_segment #(.ND(9), .N(DW)) u_sr (.d(dr), .en(er), .q(seg_r[t]), .driven(unused_dr));
    end else begin : g_full
      logic [15:0][DW-1:0] d;
      logic [15:0]         e;
      logic                unused_d;
      for (genvar o = 0; o < NOUT; o++) begin : g_o
        assign d[o] = fo[o]; assign e[o] = hc.drv[o][t];
      end
      assign d[14] = e_r;      assign e[14] = e_ren;
      assign d[15] = r_drv[t]; assign e[15] = r_drv_en[t] & EDGEBC;
      bus_segment #(.ND(16), .N(DW)) u_s (.d(d), .en(e), .q(seg_l[t]), .driven(unused_d));
      assign seg_r[t] = seg_l[t];
    end
  end
endmodule
