// tb_local_ram: self-checking testbench for local_ram.
// Writes and reads with datapath addresses against a reference array, then uses the local counter as a 64-cycle delay line (read then write of the same address each cycle).
module tb_local_ram;
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
  word_t din, addr, dout;
  logic [1:0] sc;
  logic ext_addr;
  word_t refm [64];
  local_ram #(.DEPTH(64)) dut (.clk, .rst_n, .en, .din, .addr, .sc, .ext_addr, .dout);

  initial begin : main
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    ext_addr = 1'b1; sc = 2'b10;
    for (int k = 0; k < 64; k++) begin
      @(negedge clk); addr = '{tag: 1'b0, d: 16'(k)}; din = '{tag: k[0], d: 16'($urandom)}; refm[k] = din;
    end
    @(negedge clk); sc = 2'b00;
    for (int n = 0; n < 200; n++) begin
      int k;
      k = $urandom_range(0, 63);
      addr.d = 16'(k);
      @(posedge clk); #1;
      check(dout == refm[k], $sformatf("read addr %0d", k));
      @(negedge clk);
    end
    // delay line with the local address counter: dout = value written 64 cycles earlier
    ext_addr = 1'b0; sc = 2'b11;
    begin
      word_t hist [$];
      for (int n = 0; n < 200; n++) begin
        din = '{tag: 1'b0, d: 16'(n + 1000)};
        @(posedge clk); #1;
        if (n >= 64) check(dout.d == 16'(n - 64 + 1000), $sformatf("delay line n=%0d got %0d", n, dout.d));
        @(negedge clk);
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
