// tb_addr_gen: self-checking testbench for addr_gen.
// Runs an address program with a loop over strided runs (a 2-D block walk) and compares every address with nested loops in the testbench; with ready held high the generator must deliver one address per cycle inside a run.
module tb_addr_gen;
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

  logic prog_we = 1'b0, start = 1'b0, ready = 1'b1;
  logic [3:0] prog_addr;
  logic [50:0] prog_data;
  logic [15:0] addr;
  logic valid, done;
  addr_gen #(.AW(16), .CW(16), .DEPTH(16), .STACK(4)) dut (.clk, .rst_n, .prog_we, .prog_addr,
    .prog_data, .start, .addr, .valid, .ready, .done);

  function automatic logic [50:0] agi(input cop_e op, input int cnt, input int stride, input int base);
    return {op, 16'(cnt), 16'(stride), 16'(base)};
  endfunction

  initial begin : main
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // rows of an 8-wide block in a 64-wide image, 4 rows, twice; then 5 words with stride 3
    begin
      logic [50:0] p [6];
      int exp_a [$];
      p[0] = agi(C_LOOP, 2, 0, 3);
      p[1] = agi(C_INST, 8, 1, 100);
      p[2] = agi(C_INST, 8, 1, 164);
      p[3] = agi(C_INST, 8, 2, 228);
      p[4] = agi(C_INST, 5, 3, 1000);
      p[5] = agi(C_HALT, 0, 0, 0);
      for (int r = 0; r < 2; r++) begin
        for (int k = 0; k < 8; k++) exp_a.push_back(100 + k);
        for (int k = 0; k < 8; k++) exp_a.push_back(164 + k);
        for (int k = 0; k < 8; k++) exp_a.push_back(228 + 2 * k);
      end
      for (int k = 0; k < 5; k++) exp_a.push_back(1000 + 3 * k);
      for (int k = 0; k < 6; k++) begin
        @(negedge clk); prog_we = 1'b1; prog_addr = 4'(k); prog_data = p[k];
      end
      @(negedge clk); prog_we = 1'b0; start = 1'b1; @(negedge clk); start = 1'b0;
      begin
        int n, bad, cyc, first;
        n = 0; bad = 0; cyc = 0; first = -1;
        while (!done && cyc < 500) begin
          @(negedge clk); cyc++;
          ready = (cyc > 40) ? ($urandom_range(0, 3) != 0) : 1'b1;
          if (valid && ready) begin
            if (first < 0) first = cyc;
            if (exp_a.size() == 0 || exp_a.pop_front() != int'(addr)) bad++;
            n++;
            if (n == 24) check(cyc - first + 1 <= 26, $sformatf("first 24 addresses in %0d cycles", cyc - first + 1));
          end
          @(posedge clk);
        end
        check(bad == 0, $sformatf("%0d addresses wrong", bad));
        check(n == 53, $sformatf("53 addresses, got %0d", n));
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
