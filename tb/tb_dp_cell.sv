// tb_dp_cell: self-checking testbench for dp_cell.
// Configures one cell with several paths at once and checks each against a cycle history of its inputs: two edge tracks through bus connectors into an ALU (add, registered), the same operands into the multiplier (hi and lo on half-cell tracks), a RAM used as a 64-cycle delay line, a register reading a segment driven from the right neighbour, a connector driving left with two register delays, and the daisy-chained priority when two outputs drive one track.
module tb_dp_cell;
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
  dp_soft_t sc;
  dp_hard_t hc;
  logic [T-1:0][DW-1:0] l_seg_in, l_drv, r_seg_out, r_drv;
  logic [T-1:0] l_drv_en, r_drv_en;
  logic [NALU-1:0] status;
  dp_cell dut (.clk, .rst_n, .en, .sc, .hc, .l_seg_in, .l_drv, .l_drv_en, .r_seg_out, .r_drv, .r_drv_en, .status);
  logic [15:0] xh [$], yh [$], zh [$];

  initial begin : main
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    sc = '0; hc = '0; l_seg_in = '0; r_drv = '0; r_drv_en = '0;
    hc.bc[0] = '{mode: BC_RIGHT, dly: 2'd0};     // track 4 from the left edge
    hc.bc[1] = '{mode: BC_RIGHT, dly: 2'd0};     // track 5 from the left edge
    hc.bc[4] = '{mode: BC_LEFT,  dly: 2'd2};     // track 8 drives left, 2 registers
    sc.mux[3] = 4'd5; sc.mux[4] = 4'd6;          // ALU0 a = track 4, b = track 5
    sc.alu[0] = '{op: ALU_ADD, cin: 1'b0, acc: 1'b0};
    hc.alu_dly[0] = 2'd1;
    hc.drv[2][6] = 1'b1;                          // ALU0 -> track 6
    hc.drv[6][6] = 1'b1;                          // GPR2 also enabled on track 6: lower priority
    sc.mux[10] = 4'd5;
    sc.mux[11] = 4'd5; sc.mux[12] = 4'd6;        // multiplier operands
    hc.mul = '{shift: 5'd0, sgn: 1'b0, rnd: 1'b0, tag_en: 1'b0};
    hc.drv[7][9] = 1'b1; hc.drv[8][10] = 1'b1;   // hi -> track 9, lo -> track 10 (right halves)
    sc.mux[1] = 4'd5; sc.ram[0] = 2'b11;         // RAM0: delay line of x
    hc.drv[1][3] = 1'b1;                          // RAM0 -> track 3
    r_drv_en[7] = 1'b1;                           // right neighbour drives track 7
    sc.mux[0] = 4'd8; hc.gpr_dly[0] = 2'd1;      // GPR0 reads track 7, one register
    hc.drv[0][2] = 1'b1;                          // GPR0 -> track 2
    sc.mux[5] = 4'd5; hc.drv[3][8] = 1'b1;       // GPR1 (no delay) puts x on track 8
    for (int n = 0; n < 200; n++) begin
      logic [15:0] x, y, z;
      @(negedge clk);
      x = 16'($urandom); y = 16'($urandom); z = 16'($urandom);
      l_seg_in[4] = {1'b0, x}; l_seg_in[5] = {1'b0, y}; r_drv[7] = {1'b0, z};
      xh.push_front(x); yh.push_front(y); zh.push_front(z);
      #1;
      check(r_seg_out[4] == {1'b0, x}, "connector passes track 4");
      if (n >= 1) check(r_seg_out[6][15:0] == 16'(xh[1] + yh[1]), $sformatf("ALU sum n=%0d", n));
      if (n >= 2) check({r_seg_out[9][15:0], r_seg_out[10][15:0]} == 32'(xh[2]) * 32'(yh[2]), $sformatf("product n=%0d", n));
      if (n >= 65) check(r_seg_out[3][15:0] == xh[65], $sformatf("RAM delay line n=%0d", n));
      if (n >= 1) check(r_seg_out[2][15:0] == zh[1], "GPR from right-neighbour segment");
      check(l_drv_en[8] && !l_drv_en[4], "left-drive enables");
      if (n >= 2) check(l_drv[8][15:0] == xh[2], "connector drives left after 2 registers");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
