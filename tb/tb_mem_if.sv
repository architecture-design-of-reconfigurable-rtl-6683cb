// tb_mem_if: self-checking testbench for mem_if.
// Checks routing and round-robin sharing of each port between its read and write stream, mem_ready back-pressure and the one-cycle read return.
module tb_mem_if;
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

  logic [2:0] rd_req, rd_gnt, rd_valid, wr_req, wr_gnt, mem_req, mem_we, mem_ready;
  logic [2:0][15:0] rd_addr, wr_addr, wr_data, rd_data, mem_addr, mem_wdata, mem_rdata;
  mem_if #(.NPORT(3), .AW(16), .N(16)) dut (.clk, .rst_n, .rd_req, .rd_addr, .rd_gnt, .rd_valid,
    .rd_data, .wr_req, .wr_addr, .wr_data, .wr_gnt, .mem_req, .mem_we, .mem_addr, .mem_wdata,
    .mem_rdata, .mem_ready);

  initial begin : main
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    begin
      int nr [3], nw [3];
      logic [2:0] prev_rd;
      for (int p = 0; p < 3; p++) begin nr[p] = 0; nw[p] = 0; end
      prev_rd = '0;
      for (int n = 0; n < 400; n++) begin
        @(negedge clk);
        rd_req = 3'b111; wr_req = 3'b111;
        if (n >= 300) begin rd_req = 3'($urandom); wr_req = 3'($urandom); end
        mem_ready = (n >= 200) ? 3'($urandom) : 3'b111;
        for (int p = 0; p < 3; p++) begin
          rd_addr[p] = 16'($urandom); wr_addr[p] = 16'($urandom); wr_data[p] = 16'($urandom);
          mem_rdata[p] = 16'($urandom);
        end
        #1;
        for (int p = 0; p < 3; p++) begin
          check(!(rd_gnt[p] && wr_gnt[p]), "one access per port");
          check(mem_req[p] == (rd_gnt[p] | wr_gnt[p]) && mem_we[p] == wr_gnt[p], "request");
          check(!mem_req[p] || mem_ready[p], "no request while not ready");
          if (wr_gnt[p]) check(mem_addr[p] == wr_addr[p] && mem_wdata[p] == wr_data[p], "write routed");
          if (rd_gnt[p]) check(mem_addr[p] == rd_addr[p], "read routed");
          if (mem_ready[p] && (rd_req[p] || wr_req[p])) check(mem_req[p], "work conserving");
          check(rd_valid[p] == prev_rd[p], "read returns one cycle later");
          if (rd_valid[p]) check(rd_data[p] == mem_rdata[p], "read data");
          if (n < 200) begin nr[p] += rd_gnt[p]; nw[p] += wr_gnt[p]; end
        end
        prev_rd = rd_gnt;
      end
      for (int p = 0; p < 3; p++) check(nr[p] == 100 && nw[p] == 100, $sformatf("port %0d alternates: %0d reads %0d writes", p, nr[p], nw[p]));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
