// tb_config_delay: self-checking testbench for config_delay.
// Drives random words for each delay setting and compares with a shift-register history kept in the testbench; also checks that en=0 freezes the registers.
module tb_config_delay;
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
  logic [1:0] sel;
  logic [15:0] d, q, q1;
  logic [15:0] hist [4];
  config_delay #(.N(16)) dut (.clk, .rst_n, .en, .sel, .d, .q, .q1);

  initial begin : main
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    for (int s = 0; s < 4; s++) begin
      sel = 2'(s);
      for (int k = 0; k < 4; k++) hist[k] = '0;
      for (int n = 0; n < 40; n++) begin
        d = 16'($urandom);
        en = (n % 7 != 3);
        #1;
        if (n >= 3) check(q == (s == 0 ? d : hist[s-1]), $sformatf("sel=%0d n=%0d q=%h", s, n, q));
        @(posedge clk); #1;
        if (en) begin hist[2] = hist[1]; hist[1] = hist[0]; hist[0] = d; end
        if (n >= 3) check(q1 == hist[0], "q1 is first register");
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
