// rapid_alu: the general-purpose 16-bit ALU functional unit.
//
// Operands a and b come from input multiplexers; each carries a tag bit.
// The 6 soft control bits (sc: op, cin, acc) may change every cycle; the one
// hard bit tag_en makes an arithmetic overflow set the result's tag.  The
// result tag is also the OR of the operand tags, so an error state travels
// with the data.  With acc=1 operand a is replaced by the ALU's own output
// register (the first register of its ConfigDelay), which turns the ALU
// into the accumulator of a multiply-accumulate.  cin is the carry (borrow)
// into the low bit; together with the status output, which carries the
// carry (borrow) out, two ALUs form a pipelined 32-bit add.
//
// Timing: the operation is combinational; the result then passes the
// output ConfigDelay (0-3 registers, hard).  status is combinational and
// undelayed.  The split 6 soft / 1 hard, the accumulator and carry chaining
// follow the RaPiD-Benchmark description; the operation set and encoding
// are this design's choice (see rapid_pkg::alu_op_e).
module rapid_alu
  import rapid_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  word_t      a,
  input  word_t      b,
  input  alu_soft_t  sc,
  input  logic       tag_en,
  input  logic [1:0] dly,
  output word_t      y,
  output logic       status
);
  word_t          opa, res, acc_q;
  logic [W:0]     sum;
  logic           ovf;
  logic signed [W:0] diff;

  assign opa = sc.acc ? acc_q : a;

  always_comb begin
    sum    = '0;
    diff   = $signed({opa.d[W-1], opa.d}) - $signed({b.d[W-1], b.d});
    ovf    = 1'b0;
    res.d  = '0;
    status = 1'b0;
    unique case (sc.op)
      ALU_PASS: res.d = opa.d;
      ALU_ADD, ALU_ADDU: begin
        sum    = {1'b0, opa.d} + {1'b0, b.d} + {{W{1'b0}}, sc.cin};
        res.d  = sum[W-1:0];
        status = sum[W];
        ovf    = (sc.op == ALU_ADDU) ? sum[W]
               : (opa.d[W-1] == b.d[W-1]) && (res.d[W-1] != opa.d[W-1]);
      end
      ALU_SUB, ALU_SUBU: begin
        sum    = {1'b0, opa.d} - {1'b0, b.d} - {{W{1'b0}}, sc.cin};
        res.d  = sum[W-1:0];
        status = sum[W];                     // borrow out
        ovf    = (sc.op == ALU_SUBU) ? sum[W]
               : (opa.d[W-1] != b.d[W-1]) && (res.d[W-1] != opa.d[W-1]);
      end
      ALU_ABSD: begin
        res.d  = diff[W] ? W'(-diff) : diff[W-1:0];
        status = diff[W];                    // a < b
      end
      ALU_AND:  res.d = opa.d & b.d;
      ALU_OR:   res.d = opa.d | b.d;
      ALU_XOR:  res.d = opa.d ^ b.d;
      ALU_NOTA: res.d = ~opa.d;
      ALU_MIN:  begin res.d = diff[W] ? opa.d : b.d; status = diff[W]; end
      ALU_MAX:  begin res.d = diff[W] ? b.d : opa.d; status = diff[W]; end
      default:  res.d = opa.d;
    endcase
    if (sc.op inside {ALU_PASS, ALU_AND, ALU_OR, ALU_XOR, ALU_NOTA})
      status = |res.d;
    res.tag = opa.tag | b.tag | (tag_en & ovf);
  end

  config_delay #(.N(DW)) u_dly (
    .clk, .rst_n, .en, .sel(dly), .d(res), .q(y), .q1(acc_q)
  );
endmodule
