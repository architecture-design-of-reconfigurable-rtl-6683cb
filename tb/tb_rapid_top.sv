// tb_rapid_top: self-checking testbench for rapid_top.
// End to end at the default size (16 cells).  Configures the array through the configuration memory, loads the controllers and address generators, and runs a streaming kernel: two input streams x and y are added (phase A) or subtracted (phase B) by an ALU in cell 0 whose operation is switched every cycle by an instruction bit through the control path; the result travels along a pipelined bus through the other 15 cells (one register per bus connector) to an output stream.  Memory back-pressure on the output port forces FIFO-full halts; start-up forces FIFO-empty halts; controller 1 waits for a signal from controller 0.  Results in memory are compared with values computed here, and each mechanism is counted.
module tb_rapid_top;
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

  localparam int NA = 20, NB = 12, REP = 3, NWD = REP * (NA + NB);
  localparam int XB = 16'h1000, YB = 16'h2000, OB = 16'h3000;

  // mechanism counters
  int n_halt_empty = 0, n_halt_full = 0, n_istall = 0, n_wait = 0, n_loopback = 0;
  int n_adv = 0, n_sub = 0, n_add = 0;
  int rd_at [$], wr_at [$];
  always @(posedge clk) if (rst_n) begin
    if (|(dut.in_rd & dut.u_sm.if_empty)) n_halt_empty++;
    if (|(dut.out_wr & dut.u_sm.of_full)) n_halt_full++;
    if (instr_stall) n_istall++;
    if (dut.u_ig.take[1]) n_wait++;
    if (dut.u_ig.g_ctl[0].u_seq.done_inst && dut.u_ig.g_ctl[0].u_seq.pc_n < dut.u_ig.g_ctl[0].u_seq.pc) n_loopback++;
    if (adv) begin
      n_adv++;
      if (dut.in_rd[0]) begin
        rd_at.push_back(n_adv);
        if (dut.g_cell[0].u_dp.g_alu[0].u_alu.sc.op == ALU_SUB) n_sub++;
        if (dut.g_cell[0].u_dp.g_alu[0].u_alu.sc.op == ALU_ADD) n_add++;
      end
      if (dut.out_wr[2]) wr_at.push_back(n_adv);
    end
  end

  initial begin : main
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    mem_ready = 3'b111;
    for (int k = 0; k < NWD; k++) begin
      mem[XB + k] = 16'($urandom); mem[YB + k] = 16'($urandom); mem[OB + k] = 16'hdead;
    end
    // ---------------- configuration ----------------
    for (int c = 0; c < 16; c++) begin
      cc[c] = '0;
      cc[c].cp.bc[0] = '{mode: BC_RIGHT, dly: 2'd0};   // control track 0: add/sub bit
      cc[c].cp.bc[1] = '{mode: BC_RIGHT, dly: 2'd0};   // control track 1: read strobe
      cc[c].cp.bc[2] = '{mode: BC_RIGHT, dly: 2'd1};   // control track 2: write strobe, pipelined
      if (c > 0) cc[c].dp.bc[2] = '{mode: BC_RIGHT, dly: 2'd1};  // data track 6, pipelined
    end
    begin
      dp_soft_t p;
      int i0, i1;
      cc[0].dp.bc[0] = '{mode: BC_RIGHT, dly: 2'd0};
      cc[0].dp.bc[1] = '{mode: BC_RIGHT, dly: 2'd0};
      cc[0].dp.alu_dly[0] = 2'd1;
      cc[0].dp.drv[2][6] = 1'b1;
      // ALU0 operand selects: constant soft control (GND input, inverter gives the 1s)
      p = '0; p.mux[3] = 4'd5;
      for (int s = 0; s < NSOFT; s++) if (NSOFT'(p) >> s & 1) cc[0].cp.oinv[s].inv = 1'b1;
      p = '0; p.mux[4] = 4'd6;
      for (int s = 0; s < NSOFT; s++) if (NSOFT'(p) >> s & 1) cc[0].cp.oinv[s].inv = 1'b1;
      // ALU0 op: ADD (0001) when bit 0 = 0, SUB (0010) when bit 0 = 1
      p = '0; p.alu[0].op = alu_op_e'(4'b0001); i0 = soft_index(p);
      p = '0; p.alu[0].op = alu_op_e'(4'b0010); i1 = soft_index(p);
      cc[0].cp.oinv[i0] = '{sel: 6'd1, inv: 1'b1, dly: 2'd0};
      cc[0].cp.oinv[i1] = '{sel: 6'd1, inv: 1'b0, dly: 2'd0};
    end
    ec = '0;
    ec.in_drv[0][4] = 1'b1; ec.in_drv[1][5] = 1'b1;
    ec.out_sel[2] = 4'd7;
    ec.ib_sel[0] = 5'd1; ec.ib_sel[1] = 5'd2; ec.ib_sel[2] = 5'd3;
    ec.strm[0] = '{sel: 6'd2, inv: 1'b0, dly: 2'd0};
    ec.strm[1] = '{sel: 6'd2, inv: 1'b0, dly: 2'd0};
    ec.strm[5] = '{sel: 6'd3, inv: 1'b0, dly: 2'd0};
    flat = '0;
    for (int c = 0; c < 16; c++) flat[c * CELL_CFG_BITS +: CELL_CFG_BITS] = cc[c];
    flat[16 * CELL_CFG_BITS +: $bits(edge_cfg_t)] = ec;
    // words written in a scrambled order
    for (int k = 0; k < NWORDS; k++) begin
      int a;
      a = (k * 389) % NWORDS;
      @(negedge clk); cfg_we = 1'b1; cfg_addr = $bits(cfg_addr)'(a); cfg_wdata = flat[16 * a +: 16];
    end
    @(negedge clk); cfg_we = 1'b0;
    check(dut.cfg_flat == flat[NBITS-1:0], "configuration memory holds the image");
    // ---------------- programs ----------------
    begin
      logic [34:0] p0 [6], p1 [3];
      p0[0] = ci(C_SIGNAL, 0, 1);
      p0[1] = ci(C_LOOP, REP, 3);
      p0[2] = ci(C_INST, NA, 'b0110);
      p0[3] = ci(C_INST, NB, 'b0111);
      p0[4] = ci(C_INST, 17, 'b0000);
      p0[5] = ci(C_HALT, 0, 0);
      p1[0] = ci(C_WAIT, 0, 'h0010);
      p1[1] = ci(C_INST, 3, 'h0010);
      p1[2] = ci(C_HALT, 0, 0);
      for (int k = 0; k < 6; k++) begin
        @(negedge clk); ig_prog_we = 1'b1; ig_prog_sel = 2'd0; ig_prog_addr = 5'(k); ig_prog_data = p0[k];
      end
      for (int k = 0; k < 3; k++) begin
        @(negedge clk); ig_prog_we = 1'b1; ig_prog_sel = 2'd1; ig_prog_addr = 5'(k); ig_prog_data = p1[k];
      end
      for (int c = 2; c < 4; c++) begin
        @(negedge clk); ig_prog_we = 1'b1; ig_prog_sel = 2'(c); ig_prog_addr = 5'd0; ig_prog_data = ci(C_HALT, 0, 0);
      end
      @(negedge clk); ig_prog_we = 1'b0;
      for (int s = 0; s < 6; s++) begin
        int base;
        base = (s == 0) ? XB : (s == 1) ? YB : OB;
        @(negedge clk); sm_prog_we = 1'b1; sm_prog_sel = 3'(s); sm_prog_addr = 4'd0;
        sm_prog_data = (s == 0 || s == 1 || s == 5) ? agi(C_INST, NWD, 1, base) : agi(C_HALT, 0, 0, 0);
        @(negedge clk); sm_prog_addr = 4'd1; sm_prog_data = agi(C_HALT, 0, 0, 0);
      end
      @(negedge clk); sm_prog_we = 1'b0;
    end
    // ---------------- run ----------------
    @(negedge clk); start = 1'b1; @(negedge clk); start = 1'b0;
    begin
      int cyc;
      cyc = 0;
      while (!done && cyc < 20000) begin
        @(negedge clk); cyc++;
        mem_ready[2] = !(cyc >= 60 && cyc < 160);   // output port busy for 100 cycles
        mem_ready[0] = !(cyc >= 15 && cyc < 35);  // input port 0 busy for 30 cycles
      end
      check(done, $sformatf("done after %0d cycles", cyc));
    end
    // ---------------- results ----------------
    begin
      int bad;
      bad = 0;
      for (int k = 0; k < NWD; k++) begin
        logic [15:0] e;
        e = ((k % (NA + NB)) < NA) ? mem[XB + k] + mem[YB + k] : mem[XB + k] - mem[YB + k];
        if (mem[OB + k] != e) begin
          bad++;
          if (bad < 5) $display("out[%0d] = %h, expected %h", k, mem[OB + k], e);
        end
      end
      check(bad == 0, $sformatf("%0d of %0d results wrong", bad, NWD));
    end
    check(rd_at.size() == NWD && wr_at.size() == NWD, $sformatf("%0d reads, %0d writes", rd_at.size(), wr_at.size()));
    begin
      int lat_bad;
      lat_bad = 0;
      for (int k = 0; k < NWD && k < rd_at.size() && k < wr_at.size(); k++)
        if (wr_at[k] - rd_at[k] != 16) lat_bad++;
      check(lat_bad == 0, "every result leaves 16 array cycles after its operands enter");
    end
    check(n_adv == NWD + 17, $sformatf("one array cycle per instruction word: %0d", n_adv));
    check(n_add == REP * NA && n_sub == REP * NB, $sformatf("op switched by instruction bit: %0d add %0d sub", n_add, n_sub));
    $display("mechanisms: empty-halt %0d, full-halt %0d, instruction stall %0d, signal/wait %0d, loop-back %0d",
             n_halt_empty, n_halt_full, n_istall, n_wait, n_loopback);
    check(n_halt_empty > 0, "FIFO-empty halt happened");
    check(n_halt_full > 0, "FIFO-full halt happened");
    check(n_istall > 0, "instruction stall happened");
    check(n_wait > 0, "signal/wait happened");
    check(n_loopback == REP - 1, "loop back-edges");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
