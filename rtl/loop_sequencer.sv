// loop_sequencer: the programmed controller, optimised for nested loops.
// The same engine, with a wider payload, is the core of each address
// generator of the stream manager.
//
// A small store holds C-instructions {op, cnt, arg}:
//   INST   cnt, payload  emit the payload with repeat count cnt
//   LOOP   cnt, last     run the body PC+1 .. last cnt times
//   SIGNAL num           tell controller num to stop (or skip) its next wait
//   WAIT   payload       emit the payload (count 1) every cycle until signalled
//   HALT                 stop
// For INST and WAIT, arg is the payload; for LOOP it is the last PC of the
// body; for SIGNAL the controller number.
//
// Loop handling: a LOOP instruction loads LoopCount, BeginPC (= PC+1) and
// EndPC, pushing the enclosing loop's registers onto the loop stack; it
// takes one cycle.  Whenever the instruction at PC == EndPC completes, PC
// returns to BeginPC and LoopCount decrements; when LoopCount is one, the
// stack is popped and execution falls through.  Loops that end on the same
// instruction are all resolved in that same cycle, so loop overhead never
// shows up except for the one-cycle LOOP instruction.
//
// Output: one entry register (out_valid/out_ready handshake) holding
// {is_wait, cnt, payload}.  A new entry may enter the cycle the old one is
// taken, so one instruction per cycle can be issued.  The C-instruction
// set, loop stack and PC/EndPC comparison follow the RaPiD programmed
// controller; the binary encoding, store depth and stack depth are this
// design's choice.
module loop_sequencer
  import rapid_pkg::*;
#(
  parameter int PW    = 16,   // payload width
  parameter int CW    = 16,   // count width
  parameter int DEPTH = 32,   // C-instruction store entries
  parameter int STACK = 8,    // loop stack entries
  parameter int NSIG  = 4,    // number of controllers reachable by SIGNAL
  localparam int AW   = $clog2(DEPTH),
  localparam int IW_C = 3 + CW + PW
) (
  input  logic            clk,
  input  logic            rst_n,
  // program load
  input  logic            prog_we,
  input  logic [AW-1:0]   prog_addr,
  input  logic [IW_C-1:0] prog_data,
  input  logic            start,
  // emitted entries
  output logic            out_valid,
  input  logic            out_ready,
  output logic [PW-1:0]   out_payload,
  output logic [CW-1:0]   out_cnt,
  output logic            out_wait,
  // synchronisation
  output logic            sig_valid,
  output logic [$clog2(NSIG)-1:0] sig_num,
  input  logic            pending,
  output logic            take,
  output logic            running,
  output logic            halted
);
  typedef struct packed {
    cop_e          op;
    logic [CW-1:0] cnt;
    logic [PW-1:0] arg;
  } cinst_t;

  typedef struct packed {
    logic [CW-1:0] cnt;
    logic [AW-1:0] bpc;
    logic [AW-1:0] epc;
  } loop_t;

  cinst_t           store [DEPTH];
  cinst_t           ci;
  logic [AW-1:0]    pc, pc_n;
  loop_t            cur, cur_n;             // LoopCount, BeginPC, EndPC
  logic             cur_v, cur_v_n;         // a loop is active
  loop_t            stk [STACK];
  logic [$clog2(STACK+1)-1:0] sp, sp_n;
  logic             slot_free, emit, done_inst, do_loop, do_halt;

  always_ff @(posedge clk) if (prog_we) store[prog_addr] <= cinst_t'(prog_data);

  assign ci        = store[pc];
  assign slot_free = !out_valid || out_ready;

  // what the current instruction does this cycle
  always_comb begin
    emit      = 1'b0;
    done_inst = 1'b0;
    do_loop   = 1'b0;
    do_halt   = 1'b0;
    sig_valid = 1'b0;
    take      = 1'b0;
    sig_num   = ci.arg[$clog2(NSIG)-1:0];
    if (running) begin
      unique case (ci.op)
        C_INST:   if (slot_free) begin emit = 1'b1; done_inst = 1'b1; end
        C_LOOP:   do_loop = 1'b1;
        C_SIGNAL: begin sig_valid = 1'b1; done_inst = 1'b1; end
        C_WAIT:   if (pending) begin take = 1'b1; done_inst = 1'b1; end
                  else if (slot_free) emit = 1'b1;
        default:  do_halt = 1'b1;
      endcase
    end
  end

  // next PC and loop state: walk outward through loops ending at this PC
  logic  stop, lv_v;
  loop_t lv;
  always_comb begin
    stop    = 1'b0;
    lv      = cur;
    lv_v    = cur_v;
    pc_n    = pc;
    cur_n   = cur;
    cur_v_n = cur_v;
    sp_n    = sp;
    if (do_loop) begin
      pc_n    = pc + 1'b1;
      cur_n   = '{cnt: ci.cnt, bpc: pc + 1'b1, epc: ci.arg[AW-1:0]};
      cur_v_n = 1'b1;
      if (cur_v) sp_n = sp + 1'b1;
    end else if (done_inst) begin
      pc_n = pc + 1'b1;
      for (int k = 0; k <= STACK; k++) begin
        if (!stop) begin
          if (lv_v && lv.epc == pc) begin
            if (lv.cnt > 1) begin
              pc_n    = lv.bpc;
              cur_n   = '{cnt: lv.cnt - 1'b1, bpc: lv.bpc, epc: lv.epc};
              cur_v_n = 1'b1;
              stop    = 1'b1;
            end else begin
              // last iteration of this loop: pop the next one outward
              if (int'(sp) > k) begin
                lv   = stk[int'(sp) - 1 - k];
                lv_v = 1'b1;
                sp_n = sp - 1'b1 - $bits(sp)'(k);
              end else begin
                lv_v = 1'b0;
              end
              cur_n   = lv;
              cur_v_n = lv_v;
            end
          end else begin
            stop = 1'b1;
          end
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc <= '0; cur <= '0; cur_v <= 1'b0; sp <= '0;
      running <= 1'b0; halted <= 1'b0;
    end else begin
      if (start && !running) begin
        pc <= '0; cur_v <= 1'b0; sp <= '0; running <= 1'b1; halted <= 1'b0;
      end else begin
        pc <= pc_n; cur <= cur_n; cur_v <= cur_v_n; sp <= sp_n;
        if (do_halt) begin running <= 1'b0; halted <= 1'b1; end
      end
    end
  end

  always_ff @(posedge clk) if (do_loop && cur_v) stk[sp[$clog2(STACK)-1:0]] <= cur;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; out_payload <= '0; out_cnt <= '0; out_wait <= 1'b0;
    end else if (emit) begin
      out_valid   <= 1'b1;
      out_payload <= ci.arg;
      out_cnt     <= (ci.op == C_WAIT) ? CW'(1) : ci.cnt;
      out_wait    <= (ci.op == C_WAIT);
    end else if (out_ready) begin
      out_valid <= 1'b0;
    end
  end

  // the loop stack must not overflow; INST and LOOP counts are at least one
  a_stack: assert property (@(posedge clk) disable iff (!rst_n)
                            !(do_loop && cur_v && int'(sp) == STACK));
  a_count: assert property (@(posedge clk) disable iff (!rst_n)
                            !(running && ci.op inside {C_INST, C_LOOP} && ci.cnt == 0));
endmodule
