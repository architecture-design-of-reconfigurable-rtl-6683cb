// tb_gp_register: self-checking testbench for gp_register.
// Selects random tracks (or GND) every cycle with delay 0..3 and compares with a history model.
module tb_gp_register;
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
  logic [T-1:0][DW-1:0] tracks;
  logic [TSEL_W-1:0] sel;
  logic [1:0] dly;
  logic [DW-1:0] q, cur;
  logic [DW-1:0] hist [4];
  gp_register dut (.clk, .rst_n, .en, .tracks, .sel, .dly, .q);

  initial begin : main
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    for (int dl = 0; dl < 4; dl++) begin
      dly = 2'(dl);
      for (int k = 0; k < 4; k++) hist[k] = '0;
      repeat (4) @(posedge clk);
      for (int n = 0; n < 30; n++) begin
        for (int k = 0; k < T; k++) tracks[k] = DW'($urandom);
        sel = TSEL_W'($urandom_range(0, T));
        cur = (sel == 0) ? '0 : tracks[sel-1];
        #1;
        if (n >= 4) check(q == (dl == 0 ? cur : hist[dl-1]), $sformatf("dly=%0d n=%0d", dl, n));
        @(posedge clk); #1;
        hist[2] = hist[1]; hist[1] = hist[0]; hist[0] = cur;
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
