// tb_merge_repeat: self-checking testbench for merge_repeat.
// Feeds random (word, count) entries from four lanes with random gaps and halts; each issued word must equal the OR of the expected words of the lanes, and with all lanes ready the unit must issue one word per cycle.
module tb_merge_repeat;
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

  logic start = 1'b0, adv = 1'b1;
  logic [3:0] in_valid, in_ready, halted;
  logic [3:0][15:0] in_word, in_cnt;
  logic [15:0] instr;
  logic instr_valid, stall, done;
  merge_repeat #(.NCTRL(4), .IW(16), .CW(16)) dut (.clk, .rst_n, .start, .in_valid, .in_ready,
    .in_word, .in_cnt, .halted, .adv, .instr, .instr_valid, .stall, .done);
  logic [15:0] lane [4][$];   // expected expanded words per lane
  int total [4];

  initial begin : main
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // every lane gets entries totalling 200 words, so all stay aligned
    in_valid = '0; halted = '0;
    for (int i = 0; i < 4; i++) begin
      total[i] = 0;
    end
    fork
      for (int i = 0; i < 4; i++) begin
        automatic int li = i;
        fork begin
          while (total[li] < 200) begin
            automatic int c;
            automatic logic [15:0] w;
            c = $urandom_range(1, 9);
            if (total[li] + c > 200) c = 200 - total[li];
            w = 16'(1 << (4 * li + $urandom_range(0, 3)));
            @(negedge clk);
            if (li != 0) repeat ($urandom_range(0, 2)) @(negedge clk);
            in_valid[li] = 1'b1; in_word[li] = w; in_cnt[li] = 16'(c);
            forever begin
              #3;
              if (in_ready[li]) break;
              @(negedge clk);
            end
            @(posedge clk);
            for (int r = 0; r < c; r++) lane[li].push_back(w);
            total[li] += c;
            #1 in_valid[li] = 1'b0;
          end
          halted[li] = 1'b1;
        end join_none
      end
      begin
        int got, bad;
        got = 0; bad = 0;
        while (got < 200) begin
          @(posedge clk); #1;
          adv = ($urandom_range(0, 7) != 0);
          if (instr_valid && adv) begin
            logic [15:0] e;
            e = '0;
            for (int i = 0; i < 4; i++) if (lane[i].size() > 0) e |= lane[i].pop_front();
            if (e != instr) bad++;
            got++;
          end
        end
        adv = 1'b1;
        check(bad == 0, $sformatf("%0d merged words wrong", bad));
        check(got == 200, "200 words");
      end
    join
    repeat (5) @(posedge clk); #1;
    check(done, "done after all lanes halted");
    // throughput: lane 0 alone, one entry of 50: 50 words in 50 consecutive cycles
    @(negedge clk); start = 1'b1; halted = 4'b1110; @(negedge clk); start = 1'b0;
    halted = 4'b1110; in_valid = 4'b0001; in_word[0] = 16'h00f0; in_cnt[0] = 16'd50;
    @(posedge clk); #1 in_valid = '0;
    begin
      int first, last, n;
      n = 0; first = -1; last = -1;
      for (int c = 0; c < 60; c++) begin
        @(posedge clk); #1;
        if (instr_valid) begin
          n++; if (first < 0) first = c; last = c;
          check(instr == 16'h00f0, "repeated word");
        end
      end
      check(n == 50 && last - first == 49, $sformatf("50 words back to back, n=%0d", n));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
