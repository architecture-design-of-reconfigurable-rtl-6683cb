// tb_cp_cell: self-checking testbench for cp_cell.
// Feeds random bits into the control tracks at the left edge and checks soft outputs taken straight from a track, inverted, through a 3-LUT (majority), from an ALU status bit, from a track pipelined by a connector, and a connector driving left.
module tb_cp_cell;
  import rapid_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic en = 1'b1;
  cp_cfg_t cfg;
  logic [CT-1:0] l_seg_in, l_drv, l_drv_en, r_seg_out, r_drv, r_drv_en;
  logic [NALU-1:0] status;
  dp_soft_t sc;
  logic [NSOFT-1:0] sb;
  cp_cell dut (.clk, .rst_n, .en, .cfg, .l_seg_in, .l_drv, .l_drv_en, .r_seg_out, .r_drv, .r_drv_en, .status, .sc);
  assign sb = NSOFT'(sc);
  logic [CT-1:0] lh [$];
  logic [NALU-1:0] sh [$];
  logic [CT-1:0] rh [$];

  initial begin : main
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    cfg = '0; r_drv = '0; r_drv_en = '0;
    for (int t = 0; t < 4; t++) cfg.bc[t] = '{mode: BC_RIGHT, dly: 2'd0};
    cfg.bc[4] = '{mode: BC_RIGHT, dly: 2'd2};
    cfg.bc[20] = '{mode: BC_LEFT, dly: 2'd1};
    r_drv_en[20] = 1'b1;
    cfg.oinv[0]  = '{sel: 6'd1, inv: 1'b0, dly: 2'd0};   // track 0
    cfg.oinv[50] = '{sel: 6'd2, inv: 1'b1, dly: 2'd2};   // ~track 1, 2 more registers
    cfg.lut[0].in_sel = '{5'd2, 5'd1, 5'd0};
    cfg.lut[0].tt = 8'b1110_1000;                        // majority
    cfg.lut[0].drv[10] = 1'b1;
    cfg.oinv[77] = '{sel: 6'd11, inv: 1'b0, dly: 2'd0};  // track 10 (LUT)
    cfg.st_drv[1][12] = 1'b1;
    cfg.oinv[103] = '{sel: 6'd13, inv: 1'b1, dly: 2'd0}; // ~status[1] via track 12
    cfg.oinv[9] = '{sel: 6'd5, inv: 1'b0, dly: 2'd0};    // track 4 after its connector
    cfg.oinv[30] = '{sel: 6'd0, inv: 1'b1, dly: 2'd0};   // constant one
    for (int n = 0; n < 200; n++) begin
      logic [CT-1:0] l, r;
      logic [NALU-1:0] s;
      @(negedge clk);
      l = $urandom; s = 3'($urandom); r = $urandom;
      l_seg_in = l; status = s; r_drv = r;
      lh.push_front(l); sh.push_front(s); rh.push_front(r);
      #1;
      check(r_seg_out[3:0] == l[3:0], "connectors pass tracks 0-3");
      if (n >= 2) check(r_seg_out[4] == lh[2][4], "connector with two registers");
      if (n >= 1) check(l_drv[20] == rh[1][20] && l_drv_en[20], "left-driving connector");
      if (n >= 1) begin
        logic [2:0] m;
        m = {lh[1][2], lh[1][1], lh[1][0]};
        check(sb[0] == lh[1][0], "plain soft bit");
        check(sb[77] == ((m[0] & m[1]) | (m[0] & m[2]) | (m[1] & m[2])), "LUT majority");
        check(sb[103] == !sh[1][1], "inverted ALU status");
        check(sb[30] == 1'b1, "constant");
      end
      if (n >= 3) check(sb[50] == !lh[3][1], "inverted and delayed");
      if (n >= 3) check(sb[9] == lh[3][4], "pipelined track");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
