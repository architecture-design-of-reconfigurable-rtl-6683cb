// tb_config_mem: self-checking testbench for config_mem.
// Writes 16-bit words in a scrambled order and checks every bit of the flat configuration output, including after overwriting.
module tb_config_mem;
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

  logic we = 1'b0;
  logic [5:0] addr;
  logic [15:0] wdata;
  logic [1000-1:0] cfg;
  logic [15:0] ref_w [63];
  config_mem #(.NBITS(1000)) dut (.clk, .rst_n, .we, .addr, .wdata, .cfg);

  initial begin : main
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    check(cfg == '0, "reset clears");
    for (int k = 0; k < 63; k++) ref_w[k] = 16'($urandom);
    for (int k = 0; k < 63; k++) begin
      @(negedge clk); we = 1'b1; addr = 6'((k * 37) % 63); wdata = ref_w[(k * 37) % 63];
    end
    @(negedge clk); we = 1'b1; addr = 6'd5; ref_w[5] = 16'hbeef; wdata = 16'hbeef;
    @(negedge clk); we = 1'b0;
    for (int b = 0; b < 1000; b++) check(cfg[b] == ref_w[b / 16][b % 16], $sformatf("bit %0d", b));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
