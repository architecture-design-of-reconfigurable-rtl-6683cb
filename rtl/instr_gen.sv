// instr_gen: the instruction generator.  NCTRL programmed controllers
// (loop_sequencer), one per parallel loop nest, feed the synchronisation
// unit (ctrl_sync), and a repeat-and-merge unit (merge_repeat) ORs their
// repeated instruction words into the single instruction stream that
// drives the configurable control path.
//
// Program load: prog_we writes C-instruction prog_data at prog_addr of
// controller prog_sel.  start (pulse) restarts all controllers at PC 0.
// Output: (instr, instr_valid); adv tells the generator that the array
// consumed the current word.  done rises once every controller has halted
// and every word has been issued.  Four controllers, a synchroniser and a
// bitwise-OR merge follow the RaPiD-Benchmark instruction generator.
module instr_gen
  import rapid_pkg::*;
#(
  parameter int NCTRL = 4,
  parameter int IW    = 16,
  parameter int CW    = 16,
  parameter int DEPTH = 32,
  parameter int STACK = 8,
  localparam int AW   = $clog2(DEPTH),
  localparam int NW   = $clog2(NCTRL),
  localparam int CIW  = 3 + CW + IW
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           prog_we,
  input  logic [NW-1:0]  prog_sel,
  input  logic [AW-1:0]  prog_addr,
  input  logic [CIW-1:0] prog_data,
  input  logic           start,
  input  logic           adv,
  output logic [IW-1:0]  instr,
  output logic           instr_valid,
  output logic           stall,
  output logic           done
);
  logic [NCTRL-1:0]         v, rdy, sv, pend, take, halted, wt, running;
  logic [NCTRL-1:0][IW-1:0] pl;
  logic [NCTRL-1:0][CW-1:0] cnt;
  logic [NCTRL-1:0][NW-1:0] snum;

  for (genvar i = 0; i < NCTRL; i++) begin : g_ctl
    loop_sequencer #(.PW(IW), .CW(CW), .DEPTH(DEPTH), .STACK(STACK), .NSIG(NCTRL)) u_seq (
      .clk, .rst_n,
      .prog_we(prog_we && prog_sel == NW'(i)), .prog_addr, .prog_data, .start,
      .out_valid(v[i]), .out_ready(rdy[i]), .out_payload(pl[i]), .out_cnt(cnt[i]),
      .out_wait(wt[i]), .sig_valid(sv[i]), .sig_num(snum[i]), .pending(pend[i]),
      .take(take[i]), .running(running[i]), .halted(halted[i])
    );
  end

  ctrl_sync #(.NCTRL(NCTRL)) u_sync (
    .clk, .rst_n, .start, .sig_valid(sv), .sig_num(snum), .take, .pending(pend)
  );

  merge_repeat #(.NCTRL(NCTRL), .IW(IW), .CW(CW)) u_mr (
    .clk, .rst_n, .start, .in_valid(v), .in_ready(rdy), .in_word(pl), .in_cnt(cnt),
    .halted(halted & ~running), .adv, .instr, .instr_valid, .stall, .done
  );

  logic unused;
  assign unused = ^wt;
endmodule
