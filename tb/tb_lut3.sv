// tb_lut3: self-checking testbench for lut3.
// Programs random truth tables and input selections and compares the output with the table looked up in the testbench (delay 0 and 1).
module tb_lut3;
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
  logic [CT-1:0] tracks;
  lut_cfg_t cfg;
  logic q, prev;
  lut3 dut (.clk, .rst_n, .en, .tracks, .cfg, .q);

  initial begin : main
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    cfg = '0;
    for (int n = 0; n < 200; n++) begin
      logic [2:0] idx;
      cfg.tt = 8'($urandom);
      for (int i = 0; i < 3; i++) cfg.in_sel[i] = 5'($urandom);
      cfg.dly = 2'd0;
      tracks = $urandom;
      for (int i = 0; i < 3; i++) idx[i] = tracks[cfg.in_sel[i]];
      #1;
      check(q == cfg.tt[idx], $sformatf("n=%0d", n));
      cfg.dly = 2'd1; prev = cfg.tt[idx];
      @(posedge clk); #1;
      check(q == prev, "registered output");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
