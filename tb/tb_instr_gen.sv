// tb_instr_gen: self-checking testbench for instr_gen.
// Controller 0 runs the compiled loop nest while controllers 1-3 halt: the merged stream must equal the source loop conditions and be issued at one word per cycle.  Then a signal/wait pair between two controllers is checked, with the two streams ORed.
module tb_instr_gen;
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

  logic prog_we = 1'b0, start = 1'b0, adv = 1'b1;
  logic [1:0] prog_sel;
  logic [4:0] prog_addr;
  logic [34:0] prog_data;
  logic [15:0] instr;
  logic instr_valid, stall, done;
  instr_gen #(.NCTRL(4), .IW(16), .CW(16), .DEPTH(32), .STACK(8)) dut (.clk, .rst_n, .prog_we,
    .prog_sel, .prog_addr, .prog_data, .start, .adv, .instr, .instr_valid, .stall, .done);
  task automatic load(input int c, input int a, input logic [34:0] d);
    @(negedge clk); prog_we = 1'b1; prog_sel = 2'(c); prog_addr = 5'(a); prog_data = d;
    @(negedge clk); prog_we = 1'b0;
  endtask

  // the nested loop of the instruction-generation example, compiled into C-instructions
  function automatic logic [34:0] ci(input cop_e op, input int cnt, input int arg);
    return {op, 16'(cnt), 16'(arg)};
  endfunction
  logic [34:0] prog8 [10];
  initial begin
    prog8[0] = ci(C_LOOP, 10, 8);
    prog8[1] = ci(C_LOOP, 4, 4);
    prog8[2] = ci(C_INST, 1, 'b1100);
    prog8[3] = ci(C_INST, 5, 'b0100);
    prog8[4] = ci(C_INST, 24, 'b0110);
    prog8[5] = ci(C_LOOP, 16, 8);
    prog8[6] = ci(C_INST, 1, 'b1001);
    prog8[7] = ci(C_INST, 5, 'b0000);
    prog8[8] = ci(C_INST, 24, 'b0010);
    prog8[9] = ci(C_HALT, 0, 0);
  end
  // reference: the four conditions of the source loop nest, evaluated directly
  logic [15:0] refq [$];
  initial
    for (int i = 0; i < 10; i++)
      for (int j = 0; j < 20; j++)
        for (int k = 0; k < 30; k++)
          refq.push_back({12'd0, k == 0, j <= 3, k > 5, (k == 0) && (j > 3)});

  initial begin : main
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    for (int k = 0; k < 10; k++) load(0, k, prog8[k]);
    for (int c = 1; c < 4; c++) load(c, 0, ci(C_HALT, 0, 0));
    @(negedge clk); start = 1'b1; @(negedge clk); start = 1'b0;
    begin
      int cyc, words, bad, first;
      cyc = 0; words = 0; bad = 0; first = -1;
      while (!done && cyc < 10000) begin
        @(posedge clk); #1; cyc++;
        if (instr_valid) begin
          if (first < 0) first = cyc;
          if (refq.size() == 0 || refq.pop_front() != instr) bad++;
          words++;
        end
      end
      check(bad == 0, $sformatf("%0d words wrong", bad));
      check(words == 6000, $sformatf("words=%0d", words));
      check(cyc - first + 1 <= 6002, $sformatf("issue took %0d cycles for 6000 words", cyc - first + 1));
    end
    // signal / wait: controller 1 waits (word 0x0100) until controller 0 signals it
    load(0, 0, ci(C_SIGNAL, 0, 1));
    load(0, 1, ci(C_INST, 3, 'h0001));
    load(0, 2, ci(C_HALT, 0, 0));
    load(1, 0, ci(C_WAIT, 0, 'h0100));
    load(1, 1, ci(C_INST, 2, 'h0010));
    load(1, 2, ci(C_HALT, 0, 0));
    @(negedge clk); start = 1'b1; @(negedge clk); start = 1'b0;
    begin
      logic [15:0] got [$];
      int cyc;
      cyc = 0;
      while (!done && cyc < 100) begin
        @(posedge clk); #1; cyc++;
        if (instr_valid) got.push_back(instr);
      end
      check(got.size() == 3, $sformatf("3 words, got %0d", got.size()));
      if (got.size() == 3) begin
        check(got[0] == 16'h0101, $sformatf("wait word merged: %h", got[0]));
        check(got[1] == 16'h0011 && got[2] == 16'h0011, "released controller merged");
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
