// tb_booth_mult: self-checking testbench for booth_mult.
// Random signed and unsigned operands with random shifts and rounding, compared with a product computed in the testbench; checks the 2-cycle latency and both output halves.
module tb_booth_mult;
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
  word_t a, b, hi, lo;
  mult_cfg_t cfg;
  booth_mult dut (.clk, .rst_n, .en, .a, .b, .cfg, .dly_hi(2'd0), .dly_lo(2'd0), .hi, .lo);
  longint expq [$];

  initial begin : main
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    for (int n = 0; n < 600; n++) begin
      longint p, r;
      @(negedge clk);
      if (n % 50 == 0) begin
        cfg.sgn = 1'($urandom); cfg.rnd = 1'($urandom); cfg.shift = 5'($urandom_range(0, 20)); cfg.tag_en = 1'b1;
        expq.delete();
        repeat (3) @(negedge clk);
      end
      a = '{tag: 1'b0, d: 16'($urandom)}; b = '{tag: 1'b0, d: 16'($urandom)};
      if (n % 9 == 0) a.d = 16'h8000;
      if (n % 13 == 0) b.d = 16'h8000;
      if (n % 17 == 0) b.d = 16'hffff;
      if (cfg.sgn) p = longint'($signed(a.d)) * longint'($signed(b.d));
      else         p = longint'(a.d) * longint'(b.d);
      if (cfg.rnd && cfg.shift != 0) p = p + (longint'(1) << (cfg.shift - 1));
      r = p >>> cfg.shift;
      expq.push_back(r);
      @(posedge clk); #1;
      if (expq.size() > 1) begin
        longint e;
        e = expq.pop_front();
        check({hi.d, lo.d} == e[31:0], $sformatf("n=%0d got %h exp %h", n, {hi.d, lo.d}, e[31:0]));
      end
    end
    // latency: a single product appears exactly two cycles later
    @(negedge clk); cfg = '{shift: 5'd0, sgn: 1'b0, rnd: 1'b0, tag_en: 1'b1};
    a = '{tag: 1'b1, d: 16'd300}; b = '{tag: 1'b0, d: 16'd500};
    @(negedge clk); a = '0; b = '0;
    check({hi.d, lo.d} != 32'd150000, "not ready after 1 cycle");
    @(negedge clk);
    check({hi.d, lo.d} == 32'd150000 && hi.tag && lo.tag, "ready after 2 cycles with tag");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
