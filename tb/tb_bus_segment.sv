// tb_bus_segment: self-checking testbench for bus_segment.
// Random driver enables; the segment must carry the lowest-numbered enabled driver, or zero when none is enabled.
module tb_bus_segment;
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

  logic [5:0][16:0] d;
  logic [5:0] en;
  logic [16:0] q, exp_q;
  logic driven;
  bus_segment #(.ND(6), .N(17)) dut (.d, .en, .q, .driven);

  initial begin : main
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    for (int n = 0; n < 300; n++) begin
      for (int k = 0; k < 6; k++) d[k] = 17'($urandom);
      en = 6'($urandom);
      if (n % 5 == 0) en = 6'd1 << (n % 6);
      if (n % 11 == 0) en = '0;
      exp_q = '0;
      for (int k = 5; k >= 0; k--) if (en[k]) exp_q = d[k];
      #1;
      check(q == exp_q && driven == (en != 0), $sformatf("en=%b q=%h exp=%h", en, q, exp_q));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
