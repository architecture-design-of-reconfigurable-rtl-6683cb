// tb_loop_sequencer: self-checking testbench for loop_sequencer.
// Runs the compiled three-deep loop nest (two loops ending on the same instruction) and expands the emitted (word, count) entries; the word stream must equal the conditions of the source loop nest evaluated directly, and the controller must need only one cycle per entry plus one per LOOP instruction.
module tb_loop_sequencer;
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

  logic prog_we = 1'b0, start = 1'b0, out_ready = 1'b1;
  logic [4:0] prog_addr;
  logic [34:0] prog_data;
  logic out_valid, out_wait, sig_valid, take, running, halted;
  logic [15:0] out_payload, out_cnt;
  logic [1:0] sig_num;
  loop_sequencer #(.PW(16), .CW(16), .DEPTH(32), .STACK(8), .NSIG(4)) dut (
    .clk, .rst_n, .prog_we, .prog_addr, .prog_data, .start, .out_valid, .out_ready,
    .out_payload, .out_cnt, .out_wait, .sig_valid, .sig_num, .pending(1'b0), .take,
    .running, .halted);

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

    for (int k = 0; k < 10; k++) begin
      @(negedge clk); prog_we = 1'b1; prog_addr = 5'(k); prog_data = prog8[k];
    end
    @(negedge clk); prog_we = 1'b0; start = 1'b1;
    @(negedge clk); start = 1'b0;
    begin
      int cyc, words, entries, bad;
      cyc = 0; words = 0; entries = 0; bad = 0;
      while (!halted && cyc < 5000) begin
        @(posedge clk); cyc++;
        if (out_valid && out_ready) begin
          entries++;
          for (int r = 0; r < int'(out_cnt); r++) begin
            logic [15:0] e;
            e = (refq.size() > 0) ? refq.pop_front() : 16'hffff;
            if (e != out_payload) bad++;
            words++;
          end
        end
      end
      @(posedge clk);
      if (out_valid) begin
        entries++;
        for (int r = 0; r < int'(out_cnt); r++) begin
          logic [15:0] e;
          e = (refq.size() > 0) ? refq.pop_front() : 16'hffff;
          if (e != out_payload) bad++;
          words++;
        end
      end
      check(bad == 0, $sformatf("%0d words differ from the loop nest", bad));
      check(words == 6000, $sformatf("words=%0d", words));
      check(entries == 600, $sformatf("entries=%0d", entries));
      check(refq.size() == 0, "reference exhausted");
      // 600 entries + 21 LOOP instructions + halt
      check(cyc <= 625, $sformatf("cycles=%0d", cyc));
      check(halted && !running, "halted");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
