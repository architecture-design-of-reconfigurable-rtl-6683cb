// merge_repeat: the repeater and bitwise-OR merge unit of the instruction
// generator.  Each controller delivers entries {word, count}; one lane per
// controller holds the current entry and its remaining count.  Each issued
// cycle every live lane contributes its word, the words are ORed into the
// single instruction word sent to the control path, and every lane counts
// down; a lane whose count runs out takes its controller's next entry in
// the same cycle, so back-to-back entries issue without a gap.
//
// A lane is live until its controller has halted and the lane is empty;
// halted lanes contribute zero.  An instruction is issued only when every
// live lane holds a word: otherwise the output register holds no valid
// word and the array waits (an instruction stall, counted on stall).
// Output: registered (instr, instr_valid), advanced when adv is high (the
// array consumed the word) or when it holds no valid word.  Repeating by
// count and merging by bitwise OR follow the RaPiD instruction generator;
// keeping a count per controller, rather than one count after the merge,
// is this design's choice so that controllers with different counts can
// share the stream.
module merge_repeat #(
  parameter int NCTRL = 4,
  parameter int IW    = 16,
  parameter int CW    = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic [NCTRL-1:0]         in_valid,
  output logic [NCTRL-1:0]         in_ready,
  input  logic [NCTRL-1:0][IW-1:0] in_word,
  input  logic [NCTRL-1:0][CW-1:0] in_cnt,
  input  logic [NCTRL-1:0]         halted,
  input  logic                     adv,
  output logic [IW-1:0]            instr,
  output logic                     instr_valid,
  output logic                     stall,
  output logic                     done
);
  logic [NCTRL-1:0][IW-1:0] word;
  logic [NCTRL-1:0][CW-1:0] rem;
  logic [NCTRL-1:0]         has, live;
  logic                     load_ok, issue;
  logic [IW-1:0]            merged;

  assign load_ok = adv || !instr_valid;

  always_comb
    for (int i = 0; i < NCTRL; i++) live[i] = !(halted[i] && !has[i] && !in_valid[i]);

  always_comb begin
    issue  = load_ok && (live != '0);
    merged = '0;
    for (int i = 0; i < NCTRL; i++) begin
      if (live[i] && !has[i]) issue = 1'b0;
      if (has[i]) merged |= word[i];
    end
    for (int i = 0; i < NCTRL; i++)
      in_ready[i] = !has[i] || (issue && rem[i] == CW'(1));
    stall = load_ok && (live != '0) && !issue;
    done  = (live == '0) && !instr_valid;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      has <= '0; rem <= '0; word <= '0;
      instr <= '0; instr_valid <= 1'b0;
    end else if (start) begin
      has <= '0; instr_valid <= 1'b0;
    end else begin
      for (int i = 0; i < NCTRL; i++) begin
        if (in_ready[i] && in_valid[i]) begin
          has[i]  <= 1'b1;
          word[i] <= in_word[i];
          rem[i]  <= in_cnt[i];
        end else if (issue && has[i]) begin
          if (rem[i] == CW'(1)) has[i] <= 1'b0;
          else                  rem[i] <= rem[i] - 1'b1;
        end
      end
      if (load_ok) begin
        instr_valid <= issue;
        if (issue) instr <= merged;
      end
    end
  end
endmodule
