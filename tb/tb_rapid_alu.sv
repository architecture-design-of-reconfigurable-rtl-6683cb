// tb_rapid_alu: self-checking testbench for rapid_alu.
// Random operands and operations compared with an independent model (dly 0); then a 32-bit add split over two ALU operations via the carry, the accumulator mode and the overflow tag.
module tb_rapid_alu;
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
  word_t a, b, y;
  alu_soft_t sc;
  logic tag_en, status;
  logic [1:0] dly;
  rapid_alu dut (.clk, .rst_n, .en, .a, .b, .sc, .tag_en, .dly, .y, .status);

  function automatic logic [16:0] model(input int op, input logic [15:0] x, input logic [15:0] z, input logic ci);
    int sx, sz;
    sx = $signed(x); sz = $signed(z);
    case (op)
      0: return {1'b0, x};
      1, 10: return {1'b0, x} + {1'b0, z} + 17'(ci);
      2, 11: return {1'b0, x} - {1'b0, z} - 17'(ci);
      3: return {1'b0, 16'((sx > sz) ? sx - sz : sz - sx)};
      4: return {1'b0, x & z};
      5: return {1'b0, x | z};
      6: return {1'b0, x ^ z};
      7: return {1'b0, ~x};
      8: return {1'b0, (sx < sz) ? x : z};
      9: return {1'b0, (sx < sz) ? z : x};
      default: return '0;
    endcase
  endfunction

  initial begin : main
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    dly = 2'd0; tag_en = 1'b1; sc = '0;
    for (int n = 0; n < 2000; n++) begin
      int op;
      logic [16:0] m;
      op = $urandom_range(0, 11);
      a.d = 16'($urandom); b.d = 16'($urandom); a.tag = ($urandom_range(0, 9) == 0); b.tag = 1'b0;
      if (n % 4 == 0) b.d = a.d;
      sc.op = alu_op_e'(op); sc.cin = (op inside {1, 2, 10, 11}) ? 1'($urandom) : 1'b0; sc.acc = 1'b0;
      m = model(op, a.d, b.d, sc.cin);
      #1;
      check(y.d == m[15:0], $sformatf("op=%0d a=%h b=%h y=%h exp=%h", op, a.d, b.d, y.d, m[15:0]));
      if (op inside {1, 10}) check(status == m[16], "carry out");
      if (op == 10) check(y.tag == (a.tag | m[16]), "unsigned add overflow tag");
      if (op == 1) check(y.tag == (a.tag | ((a.d[15] == b.d[15]) && (m[15] != a.d[15]))), "signed add overflow tag");
      if (op inside {4, 5, 6}) check(y.tag == a.tag && status == (m[15:0] != 0), "logic tag/status");
    end
    // 32-bit add: low half then high half with the carry fed back as cin
    for (int n = 0; n < 100; n++) begin
      logic [31:0] x, z, s;
      logic c;
      x = $urandom; z = $urandom; s = x + z;
      a = '{tag: 1'b0, d: x[15:0]}; b = '{tag: 1'b0, d: z[15:0]};
      sc = '{op: ALU_ADDU, cin: 1'b0, acc: 1'b0}; tag_en = 1'b0; #1;
      check(y.d == s[15:0], "low half"); c = status;
      a.d = x[31:16]; b.d = z[31:16]; sc.cin = c; #1;
      check(y.d == s[31:16], "high half with carry");
    end
    // accumulator: y register accumulates b with dly=1
    dly = 2'd1; tag_en = 1'b0;
    a = '0; b = '0; sc = '{op: ALU_PASS, cin: 1'b0, acc: 1'b0};
    @(posedge clk); #1;
    begin
      logic [15:0] acc_ref;
      acc_ref = '0;
      sc = '{op: ALU_ADD, cin: 1'b0, acc: 1'b1};
      for (int n = 0; n < 50; n++) begin
        b.d = 16'($urandom_range(0, 1000));
        acc_ref += b.d;
        @(posedge clk); #1;
        check(y.d == acc_ref, $sformatf("accumulate n=%0d", n));
      end
      // halted: en=0 holds the accumulator
      en = 1'b0; b.d = 16'd7;
      repeat (3) @(posedge clk); #1;
      check(y.d == acc_ref, "held while halted");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
