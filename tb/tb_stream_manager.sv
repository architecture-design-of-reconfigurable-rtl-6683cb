// tb_stream_manager: self-checking testbench for stream_manager.
// Three input streams copy memory regions into the datapath side and three output streams write them back elsewhere, with random pop/push strobes and random memory back-pressure; checks data, addresses, the halt flag on empty/full FIFOs and done.
module tb_stream_manager;
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

  logic prog_we = 1'b0, start = 1'b0, adv;
  logic [2:0] prog_sel;
  logic [3:0] prog_addr;
  logic [50:0] prog_data;
  logic [2:0] in_rd, out_wr, mem_req, mem_we, mem_ready;
  logic [2:0][15:0] in_data, out_data, mem_addr, mem_wdata, mem_rdata;
  logic halt, done;
  logic [15:0] mem [65536];
  stream_manager #(.NS(3), .AW(16), .N(16), .CW(16), .FDEPTH(16), .PDEPTH(16)) dut (.clk, .rst_n,
    .prog_we, .prog_sel, .prog_addr, .prog_data, .start, .adv, .in_rd, .in_data, .out_wr,
    .out_data, .halt, .done, .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_rdata, .mem_ready);
  always_ff @(posedge clk)
    for (int p = 0; p < 3; p++)
      if (mem_req[p]) begin
        if (mem_we[p]) mem[mem_addr[p]] <= mem_wdata[p];
        else           mem_rdata[p] <= mem[mem_addr[p]];
      end
  task automatic load(input int s, input int a, input logic [50:0] d);
    @(negedge clk); prog_we = 1'b1; prog_sel = 3'(s); prog_addr = 4'(a); prog_data = d;
    @(negedge clk); prog_we = 1'b0;
  endtask

  function automatic logic [50:0] agi(input cop_e op, input int cnt, input int stride, input int base);
    return {op, 16'(cnt), 16'(stride), 16'(base)};
  endfunction

  initial begin : main
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    for (int k = 0; k < 65536; k++) mem[k] = 16'(k * 7 + 3);
    // input stream s reads 100 words from 1000*s+1, output stream s writes them to 20000+1000*s
    for (int s = 0; s < 3; s++) begin
      load(s, 0, agi(C_INST, 60, 1, 1000 * s + 1));
      load(s, 1, agi(C_INST, 40, 1, 1000 * s + 61));
      load(s, 2, agi(C_HALT, 0, 0, 0));
      load(3 + s, 0, agi(C_INST, 100, 1, 20000 + 1000 * s));
      load(3 + s, 1, agi(C_HALT, 0, 0, 0));
    end
    @(negedge clk); start = 1'b1; @(negedge clk); start = 1'b0;
    begin
      int nin [3], nout [3], halts, bad, cyc;
      logic [15:0] pend [3][$];
      for (int s = 0; s < 3; s++) begin nin[s] = 0; nout[s] = 0; end
      halts = 0; bad = 0; cyc = 0;
      in_rd = '0; out_wr = '0;
      while (cyc < 3000) begin
        @(negedge clk); cyc++;
        mem_ready = (cyc > 300 && cyc < 400) ? 3'b000 : 3'($urandom | 3'($urandom));
        for (int s = 0; s < 3; s++) begin
          in_rd[s]  = (nin[s] < 100) && ($urandom_range(0, 2) != 0);
          out_wr[s] = (pend[s].size() > 0) && (nout[s] < 100);
          out_data[s] = (pend[s].size() > 0) ? pend[s][0] : '0;
        end
        #1;
        adv = !halt;
        if (halt) halts++;
        if (adv)
          for (int s = 0; s < 3; s++) begin
            if (in_rd[s]) begin
              if (in_data[s] != 16'((1000 * s + 1 + nin[s]) * 7 + 3)) bad++;
              pend[s].push_back(in_data[s]);
              nin[s]++;
            end
            if (out_wr[s]) begin void'(pend[s].pop_front()); nout[s]++; end
          end
        if (done && nout[0] == 100 && nout[1] == 100 && nout[2] == 100) break;
      end
      check(bad == 0, $sformatf("%0d input words wrong", bad));
      check(halts > 0, "halt seen");
      check(done, "done");
      for (int s = 0; s < 3; s++) begin
        check(nin[s] == 100 && nout[s] == 100, $sformatf("stream %0d counts", s));
        for (int k = 0; k < 100; k++)
          check(mem[20000 + 1000 * s + k] == 16'((1000 * s + 1 + k) * 7 + 3), $sformatf("written s=%0d k=%0d", s, k));
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
