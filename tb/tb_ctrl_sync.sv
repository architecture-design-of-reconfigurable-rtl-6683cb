// tb_ctrl_sync: self-checking testbench for ctrl_sync.
// Signals from several controllers set the right pending flags; take clears them; a signal sent before the wait is remembered.
module tb_ctrl_sync;
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

  logic start = 1'b0;
  logic [3:0] sig_valid, take, pending;
  logic [3:0][1:0] sig_num;
  ctrl_sync #(.NCTRL(4)) dut (.clk, .rst_n, .start, .sig_valid, .sig_num, .take, .pending);
  logic [3:0] model;

  initial begin : main
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    model = '0; sig_valid = '0; take = '0; sig_num = '0;
    for (int n = 0; n < 500; n++) begin
      logic [3:0] set;
      @(negedge clk);
      sig_valid = 4'($urandom) & 4'($urandom);
      for (int i = 0; i < 4; i++) sig_num[i] = 2'($urandom);
      take = 4'($urandom) & pending;
      set = '0;
      for (int i = 0; i < 4; i++) if (sig_valid[i]) set[sig_num[i]] = 1'b1;
      @(posedge clk); #1;
      model = (model & ~take) | set;
      check(pending == model, $sformatf("n=%0d pending=%b model=%b", n, pending, model));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
