// tb_optional_inverter: self-checking testbench for optional_inverter.
// Selects GND or random control tracks, with and without inversion, and checks the registered result after 1 + delay cycles.
module tb_optional_inverter;
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
  oinv_cfg_t cfg;
  logic q, cur;
  logic hist [5];
  optional_inverter dut (.clk, .rst_n, .en, .tracks, .cfg, .q);

  initial begin : main
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    for (int dl = 0; dl < 4; dl++)
      for (int inv = 0; inv < 2; inv++) begin
        cfg.dly = 2'(dl); cfg.inv = inv[0];
        for (int k = 0; k < 5; k++) hist[k] = 1'b0;
        for (int n = 0; n < 30; n++) begin
          tracks = $urandom;
          cfg.sel = CSEL_W'($urandom_range(0, CT));
          if (n < 6) cfg.sel = '0;
          cur = ((cfg.sel == 0) ? 1'b0 : tracks[cfg.sel - 1]) ^ inv[0];
          @(posedge clk); #1;
          for (int k = 4; k > 0; k--) hist[k] = hist[k-1];
          hist[0] = cur;
          if (n >= 6) check(q == hist[dl], $sformatf("dly=%0d inv=%0d n=%0d", dl, inv, n));
        end
      end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
