// tb_rapid_sad: self-checking testbench for rapid_top.
// Workload test on the full 16-cell array: the sum-of-absolute-differences kernel of motion estimation.  Input streams 0 and 1 carry the pixels of an 8x8 block and of a candidate position (64 pixels each, 8-bit values); cell 0 ALU0 forms |x - y| and ALU1 accumulates it in its output register.  Instruction bit 1 drives ALU1 accumulate bit: it is low for the first pixel of each block, which restarts the sum, and instruction bit 2 writes the finished sum to output stream 2 through a bus that passes the other 15 cells.  The C-program uses a loop over the candidates.  Every sum is compared with one computed here, and the array must spend one cycle per instruction word.
module tb_rapid_sad;
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


  localparam int G = 24, NP = 64 * G, XB = 16'h1000, YB = 16'h4000, OB = 16'h8000;
  int n_adv = 0, n_restart = 0;
  always @(posedge clk) if (rst_n && adv) begin
    n_adv++;
    if (!dut.g_cell[0].u_dp.sc.alu[1].acc) n_restart++;
  end

  initial begin : main
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    mem_ready = 3'b111;
    for (int k = 0; k < NP; k++) begin mem[XB + k] = 16'($urandom % 256); mem[YB + k] = 16'($urandom % 256); end
    for (int k = 0; k < G; k++) mem[OB + k] = 16'hdead;
    ec = '0;
    ec.in_drv[0][4] = 1'b1; ec.in_drv[1][5] = 1'b1;
    ec.out_sel[2] = 4'd8;                                 // track 7
    for (int b = 0; b < 3; b++) ec.ib_sel[b] = 5'(b + 1);
    ec.strm[0] = '{sel: 6'd1, inv: 1'b0, dly: 2'd0};      // bit 0: read both inputs
    ec.strm[1] = '{sel: 6'd1, inv: 1'b0, dly: 2'd0};
    ec.strm[5] = '{sel: 6'd3, inv: 1'b0, dly: 2'd0};      // bit 2: write the sum
    for (int c = 0; c < 16; c++) begin
      cc[c] = '0;
      for (int t = 0; t < 3; t++) cc[c].cp.bc[t] = '{mode: BC_RIGHT, dly: 2'd0};
      if (c > 0) cc[c].dp.bc[3] = '{mode: BC_RIGHT, dly: 2'd0};   // track 7 to the right end
    end
    begin
      dp_soft_t p;
      int ia;
      cc[0].dp.bc[0] = '{mode: BC_RIGHT, dly: 2'd0};
      cc[0].dp.bc[1] = '{mode: BC_RIGHT, dly: 2'd0};
      cc[0].dp.alu_dly[0] = 2'd1; cc[0].dp.drv[2][6] = 1'b1;     // ALU0 -> track 6
      cc[0].dp.alu_dly[1] = 2'd1; cc[0].dp.drv[5][7] = 1'b1;     // ALU1 -> track 7
      p = '0;
      p.mux[3] = 4'd5; p.mux[4] = 4'd6;                          // ALU0: x, y
      p.alu[0] = '{op: ALU_ABSD, cin: 1'b0, acc: 1'b0};
      p.mux[8] = 4'd0; p.mux[9] = 4'd7;                          // ALU1: a = GND, b = |x - y|
      p.alu[1] = '{op: ALU_ADD, cin: 1'b0, acc: 1'b0};
      for (int s = 0; s < NSOFT; s++) cc[0].cp.oinv[s] = '{sel: 6'd0, inv: NSOFT'(p) >> s & 1, dly: 2'd0};
      p = '0; p.alu[1].acc = 1'b1; ia = soft_index(p);
      cc[0].cp.oinv[ia] = '{sel: 6'd2, inv: 1'b0, dly: 2'd0};    // accumulate = bit 1
    end
    flat = '0;
    for (int c = 0; c < 16; c++) flat[c * CELL_CFG_BITS +: CELL_CFG_BITS] = cc[c];
    flat[16 * CELL_CFG_BITS +: $bits(edge_cfg_t)] = ec;
    for (int k = 0; k < NWORDS; k++) begin
      @(negedge clk); cfg_we = 1'b1; cfg_addr = $bits(cfg_addr)'(k); cfg_wdata = flat[16 * k +: 16];
    end
    @(negedge clk); cfg_we = 1'b0;
    begin
      // word j acts in array cycle j+1; |x - y| of the pixel read by word j is
      // added by word j+1, so word 64g+1 restarts block g and writes block g-1
      logic [34:0] p0 [11];
      p0[0]  = ci(C_INST, 1, 'b011);
      p0[1]  = ci(C_INST, 1, 'b001);          // restarts block 0
      p0[2]  = ci(C_INST, 62, 'b011);
      p0[3]  = ci(C_LOOP, G - 1, 6);
      p0[4]  = ci(C_INST, 1, 'b011);
      p0[5]  = ci(C_INST, 1, 'b101);          // restarts block g, writes block g-1
      p0[6]  = ci(C_INST, 62, 'b011);
      p0[7]  = ci(C_INST, 1, 'b010);
      p0[8]  = ci(C_INST, 1, 'b110);          // writes the last block
      p0[9]  = ci(C_INST, 1, 'b010);          // lets the last write act
      p0[10] = ci(C_HALT, 0, 0);
      for (int k = 0; k < 11; k++) begin
        @(negedge clk); ig_prog_we = 1'b1; ig_prog_sel = 2'd0; ig_prog_addr = 5'(k); ig_prog_data = p0[k];
      end
      for (int c = 1; c < 4; c++) begin
        @(negedge clk); ig_prog_sel = 2'(c); ig_prog_addr = 5'd0; ig_prog_data = ci(C_HALT, 0, 0);
      end
      @(negedge clk); ig_prog_we = 1'b0;
      for (int s = 0; s < 6; s++) begin
        @(negedge clk); sm_prog_we = 1'b1; sm_prog_sel = 3'(s); sm_prog_addr = 4'd0;
        sm_prog_data = (s == 0) ? agi(C_INST, NP, 1, XB) : (s == 1) ? agi(C_INST, NP, 1, YB) :
                       (s == 5) ? agi(C_INST, G, 1, OB) : agi(C_HALT, 0, 0, 0);
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
        mem_ready = {1'($urandom % 6 != 0), 1'($urandom % 6 != 0), 1'($urandom % 6 != 0)};
      end
      check(done, $sformatf("done after %0d cycles", cyc));
    end
    begin
      int bad;
      bad = 0;
      for (int g = 0; g < G; g++) begin
        int e;
        e = 0;
        for (int i = 0; i < 64; i++) begin
          int d;
          d = int'(mem[XB + 64 * g + i]) - int'(mem[YB + 64 * g + i]);
          e += (d < 0) ? -d : d;
        end
        if (mem[OB + g] != 16'(e)) begin
          bad++;
          if (bad < 5) $display("sad[%0d] = %0d, expected %0d", g, mem[OB + g], e);
        end
      end
      check(bad == 0, $sformatf("%0d of %0d sums wrong", bad, G));
    end
    check(n_adv == NP + 3, $sformatf("one array cycle per instruction word: %0d", n_adv));
    // once per block, plus the first array cycle, whose soft bits are still the reset value
    check(n_restart == G + 1, $sformatf("accumulator restarted once per block: %0d", n_restart));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
