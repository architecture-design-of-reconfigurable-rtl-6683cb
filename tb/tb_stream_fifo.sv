// tb_stream_fifo: self-checking testbench for stream_fifo.
// Random push/pop traffic against a queue model, including full and empty flags.
module tb_stream_fifo;
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

  logic clr = 1'b0, push, pop;
  logic [15:0] din, dout;
  logic empty, full;
  logic [4:0] count;
  logic [15:0] q [$];
  stream_fifo #(.N(16), .DEPTH(16)) dut (.clk, .rst_n, .clr, .push, .din, .pop, .dout, .empty, .full, .count);

  initial begin : main
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      check(empty == (q.size() == 0) && full == (q.size() == 16) && int'(count) == q.size(), "flags");
      if (!empty) check(dout == q[0], "head");
      push = (n % 400 < 200) ? ($urandom_range(0, 3) != 0) : ($urandom_range(0, 3) == 0);
      pop  = (n % 400 < 200) ? ($urandom_range(0, 3) == 0) : ($urandom_range(0, 3) != 0);
      if (full) push = 1'b0;
      if (empty) pop = 1'b0;
      din = 16'($urandom);
      @(posedge clk);
      if (pop) void'(q.pop_front());
      if (push) q.push_back(din);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
