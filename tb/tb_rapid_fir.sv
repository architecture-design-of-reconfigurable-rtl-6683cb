// tb_rapid_fir: self-checking testbench for rapid_top.
// Workload test on the full 16-cell array: a 16-tap FIR filter y[m] = sum_j h[j] x[m-j] (16 multiplies per output, one output per array cycle).  Every strobe acts one array cycle after its instruction word, and a RAM shows a written word one cycle after the write, so the program has one idle word after the coefficient write and one at the end.  Phase 1 streams the 16 coefficients in on data track 5, which has one register per cell; a single write strobe on a zero-delay control track then stores h[15-k] in RAM0 of cell k.  Phase 2 broadcasts x on track 4; in each cell the multiplier forms h*x from RAM0 and the input, and ALU0 adds the partial sum from the cell to its left, the sums alternating between tracks 7 and 8 with one register per cell.  The output stream takes cell 15 sum.  Memory ports are stalled at random to exercise the halts.  All outputs from m = 15 on are compared with the filter computed here, and the array must spend exactly one cycle per instruction word.
module tb_rapid_fir;
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
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
 
  logic cfg_we = 1'b0, ig_prog_we = 1'b0, sm_prog_we = 1'b0, start = 1'b0;
  localparam int NBITS  = 16 * CELL_CFG_BITS + $bits(edge_cfg_t);
  localparam int NWORDS = (NBITS + 15) / 16;
  logic [$clog2(NWORDS)-1:0] cfg_addr;
  logic [15:0] cfg_wdata;
  logic [1:0] ig_prog_sel;
  logic [4:0] ig_prog_addr;
  logic [34:0] ig_prog_data;
  logic [2:0] sm_prog_sel;
  logic [3:0] sm_prog_addr;
  logic [50:0] sm_prog_data;
  logic done, adv, stream_halt, instr_stall;
  logic [2:0] mem_req, mem_we, mem_ready;
  logic [2:0][15:0] mem_addr, mem_wdata, mem_rdata;
  logic [15:0] mem [65536];

  rapid_top dut (.clk, .rst_n, .cfg_we, .cfg_addr, .cfg_wdata, .ig_prog_we, .ig_prog_sel,
    .ig_prog_addr, .ig_prog_data, .sm_prog_we, .sm_prog_sel, .sm_prog_addr, .sm_prog_data,
    .start, .done, .adv, .stream_halt, .instr_stall, .mem_req, .mem_we, .mem_addr, .mem_wdata,
    .mem_rdata, .mem_ready);

  // external memory: one access per port per cycle, reads return the next cycle
  always_ff @(posedge clk)
    for (int p = 0; p < 3; p++)
      if (mem_req[p]) begin
        if (mem_we[p]) mem[mem_addr[p]] <= mem_wdata[p];
        else           mem_rdata[p] <= mem[mem_addr[p]];
      end

  cell_cfg_t cc [16];
  edge_cfg_t ec;
  logic [NWORDS*16-1:0] flat;

  function automatic int soft_index(input dp_soft_t p);
    logic [NSOFT-1:0] v;
    v = NSOFT'(p);
    for (int s = 0; s < NSOFT; s++) if (v[s]) return s;
    return -1;
  endfunction

  function automatic logic [34:0] ci(input cop_e op, input int cnt, input int arg);
    return {op, 16'(cnt), 16'(arg)};
  endfunction
  function automatic logic [50:0] agi(input cop_e op, input int cnt, input int stride, input int base);
    return {op, 16'(cnt), 16'(stride), 16'(base)};
  endfunction


  localparam int NX = 300, XB = 16'h1000, HB = 16'h2000, OB = 16'h3000;
  int n_adv = 0, n_halt = 0, n_we = 0;
  always @(posedge clk) if (rst_n) begin
    if (adv) n_adv++;
    if (stream_halt) n_halt++;
    if (adv && dut.g_cell[5].u_dp.sc.ram[0][1]) n_we++;
  end

  initial begin : main
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    mem_ready = 3'b111;
    for (int k = 0; k < NX; k++) begin mem[XB + k] = 16'($urandom); mem[OB + k] = 16'hdead; end
    for (int k = 0; k < 16; k++) mem[HB + k] = 16'($urandom);
    ec = '0;
    ec.in_drv[0][4] = 1'b1; ec.in_drv[1][5] = 1'b1;
    ec.out_sel[2] = 4'd8;                                 // track 7
    for (int b = 0; b < 4; b++) ec.ib_sel[b] = 5'(b + 1); // instruction bit b on control track b
    ec.strm[0] = '{sel: 6'd1, inv: 1'b0, dly: 2'd0};      // bit 0: read x
    ec.strm[1] = '{sel: 6'd2, inv: 1'b0, dly: 2'd0};      // bit 1: read h
    ec.strm[5] = '{sel: 6'd4, inv: 1'b0, dly: 2'd0};      // bit 3: write y
    for (int c = 0; c < 16; c++) begin
      dp_soft_t p;
      int rt, wt, iwe;
      rt = (c % 2 == 0) ? 7 : 8;                          // partial sum in
      wt = (c % 2 == 0) ? 8 : 7;                          // partial sum out
      cc[c] = '0;
      for (int t = 0; t < 4; t++) cc[c].cp.bc[t] = '{mode: BC_RIGHT, dly: 2'd0};
      cc[c].dp.bc[0] = '{mode: BC_RIGHT, dly: 2'd0};                       // x broadcast
      cc[c].dp.bc[1] = '{mode: BC_RIGHT, dly: (c == 0) ? 2'd0 : 2'd1};     // h, one register per cell
      if (c > 0) cc[c].dp.bc[rt - 4] = '{mode: BC_RIGHT, dly: 2'd0};
      cc[c].dp.ram_ext_addr[0] = 1'b1;                    // RAM0 address from mux 2 (GND: word 0)
      cc[c].dp.drv[1][2] = 1'b1;                          // RAM0 -> track 2
      cc[c].dp.drv[8][3] = 1'b1;                          // product low half -> track 3
      cc[c].dp.drv[2][wt] = 1'b1;                         // ALU0 -> partial-sum track
      cc[c].dp.mul = '{shift: 5'd0, sgn: 1'b1, rnd: 1'b0, tag_en: 1'b0};
      cc[c].dp.alu_dly[0] = 2'd1;
      p = '0;
      p.mux[1] = 4'd6;                                    // RAM0 data = track 5
      p.mux[11] = 4'd5; p.mux[12] = 4'd3;                 // multiplier: x (track 4), h (track 2)
      p.mux[3] = 4'd4;                                    // ALU0 a = product (track 3)
      p.mux[4] = (c == 0) ? 4'd0 : 4'(rt + 1);            // ALU0 b = partial sum from the left
      p.alu[0] = '{op: ALU_ADD, cin: 1'b0, acc: 1'b0};
      for (int s = 0; s < NSOFT; s++) cc[c].cp.oinv[s] = '{sel: 6'd0, inv: NSOFT'(p) >> s & 1, dly: 2'd0};
      p = '0; p.ram[0] = 2'b10; iwe = soft_index(p);
      cc[c].cp.oinv[iwe] = '{sel: 6'd3, inv: 1'b0, dly: 2'd0};   // RAM0 write = bit 2
    end
    flat = '0;
    for (int c = 0; c < 16; c++) flat[c * CELL_CFG_BITS +: CELL_CFG_BITS] = cc[c];
    flat[16 * CELL_CFG_BITS +: $bits(edge_cfg_t)] = ec;
    for (int k = 0; k < NWORDS; k++) begin
      @(negedge clk); cfg_we = 1'b1; cfg_addr = $bits(cfg_addr)'(k); cfg_wdata = flat[16 * k +: 16];
    end
    @(negedge clk); cfg_we = 1'b0;
    begin
      logic [34:0] p0 [8];
      p0[0] = ci(C_INST, 15, 'b0010);         // read h[0..14]
      p0[1] = ci(C_INST, 1, 'b0110);          // read h[15], write every RAM0
      p0[2] = ci(C_INST, 1, 'b0000);          // RAM0 output shows the new word one cycle later
      p0[3] = ci(C_INST, 3, 'b0001);          // read x: fill the multiplier and ALU pipeline
      p0[4] = ci(C_INST, NX - 3, 'b1001);     // read x, write y
      p0[5] = ci(C_INST, 3, 'b1000);          // drain
      p0[6] = ci(C_INST, 1, 'b0000);          // lets the last write strobe take effect
      p0[7] = ci(C_HALT, 0, 0);
      for (int k = 0; k < 8; k++) begin
        @(negedge clk); ig_prog_we = 1'b1; ig_prog_sel = 2'd0; ig_prog_addr = 5'(k); ig_prog_data = p0[k];
      end
      for (int c = 1; c < 4; c++) begin
        @(negedge clk); ig_prog_sel = 2'(c); ig_prog_addr = 5'd0; ig_prog_data = ci(C_HALT, 0, 0);
      end
      @(negedge clk); ig_prog_we = 1'b0;
      for (int s = 0; s < 6; s++) begin
        @(negedge clk); sm_prog_we = 1'b1; sm_prog_sel = 3'(s); sm_prog_addr = 4'd0;
        sm_prog_data = (s == 0) ? agi(C_INST, NX, 1, XB) : (s == 1) ? agi(C_INST, 16, 1, HB) :
                       (s == 5) ? agi(C_INST, NX, 1, OB) : agi(C_HALT, 0, 0, 0);
        @(negedge clk); sm_prog_addr = 4'd1; sm_prog_data = agi(C_HALT, 0, 0, 0);
      end
      @(negedge clk); sm_prog_we = 1'b0;
    end
    @(negedge clk); start = 1'b1; @(negedge clk); start = 1'b0;
    begin
      int cyc;
      cyc = 0;
      while (!done && cyc < 20000) begin
        @(negedge clk); cyc++;
        mem_ready = {1'($urandom % 8 != 0), 1'b1, 1'($urandom % 8 != 0)};
      end
      check(done, $sformatf("done after %0d cycles", cyc));
    end
    begin
      int bad;
      bad = 0;
      for (int m = 15; m < NX; m++) begin
        logic [15:0] e;
        e = '0;
        for (int j = 0; j < 16; j++) e += mem[HB + j] * mem[XB + m - j];
        if (mem[OB + m] != e) begin
          bad++;
          if (bad < 5) $display("y[%0d] = %h, expected %h", m, mem[OB + m], e);
        end
      end
      check(bad == 0, $sformatf("%0d of %0d filter outputs wrong", bad, NX - 15));
    end
    check(n_adv == 16 + 1 + NX + 3 + 1, $sformatf("one array cycle per instruction word: %0d", n_adv));
    check(n_we == 1, "coefficients written once");
    check(n_halt > 0, "memory stalls halted the array");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
