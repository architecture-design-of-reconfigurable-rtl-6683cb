// booth_mult: the two-stage radix-4 Booth multiplier with a static shifter.
//
// Stage 1 recodes operand b into nine radix-4 Booth digits (-2..+2), forms
// the nine partial products of a, and adds them in two groups (digits 0-4
// and 5-8); both sums are registered.  Stage 2 adds the two sums into the
// 32-bit product, optionally adds a rounding constant, shifts right by the
// hard-programmed amount (arithmetic when signed) and registers the result.
// Both halves of the result leave through their own ConfigDelay, as hi and
// lo, so they can be routed to separate buses (e.g. to two ALUs for a
// 32-bit accumulate).
//
// Hard control (8 bits, mult_cfg_t): shift[4:0], sgn (signed operands),
// rnd (add 2^(shift-1) before shifting), tag_en (output tag = OR of input
// tags).  Latency: 2 enabled cycles plus the ConfigDelay setting.  Two
// stages, Booth encoding, 16x16->32 and the shifter follow the
// RaPiD-Benchmark description; the stage split and the meaning of the eight
// control bits are this design's choice.
module booth_mult
  import rapid_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  word_t      a,
  input  word_t      b,
  input  mult_cfg_t  cfg,
  input  logic [1:0] dly_hi,
  input  logic [1:0] dly_lo,
  output word_t      hi,
  output word_t      lo
);
  localparam int PW = 2 * W + 2;   // partial-product width

  logic signed [PW-1:0] pp [9];
  logic signed [PW-1:0] s0_d, s1_d, s0_q, s1_q, prod, rnd_c, shifted;
  logic [W+2:0]         bx;        // b extended: {ext, ext, b, 0}
  logic                 tag1_q;
  logic signed [W:0]    ax;        // a extended to 17 bits
  word_t                hi_d, lo_d, unused_h, unused_l;

  always_comb begin
    ax = {cfg.sgn & a.d[W-1], a.d};
    bx = {{2{cfg.sgn & b.d[W-1]}}, b.d, 1'b0};
    for (int i = 0; i < 9; i++) begin
      logic signed [PW-1:0] m;
      m = PW'(ax);
      unique case (bx[2*i +: 3])
        3'b001, 3'b010: pp[i] = m <<< (2 * i);
        3'b011:         pp[i] = (m <<< 1) <<< (2 * i);
        3'b100:         pp[i] = (-(m <<< 1)) <<< (2 * i);
        3'b101, 3'b110: pp[i] = (-m) <<< (2 * i);
        default:        pp[i] = '0;
      endcase
    end
    s0_d = pp[0] + pp[1] + pp[2] + pp[3] + pp[4];
    s1_d = pp[5] + pp[6] + pp[7] + pp[8];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s0_q <= '0; s1_q <= '0; tag1_q <= 1'b0;
    end else if (en) begin
      s0_q <= s0_d; s1_q <= s1_d; tag1_q <= cfg.tag_en & (a.tag | b.tag);
    end
  end

  always_comb begin
    prod  = s0_q + s1_q;
    rnd_c = (cfg.rnd && cfg.shift != 0) ? (PW'(1) <<< (cfg.shift - 1)) : '0;
    if (cfg.sgn) shifted = (prod + rnd_c) >>> cfg.shift;
    else         shifted = PW'(({2'b00, prod[2*W-1:0]} + rnd_c) >> cfg.shift);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
    end else if (en) begin
      hi_d   <= '{tag: tag1_q, d: shifted[2*W-1:W]};
      lo_d   <= '{tag: tag1_q, d: shifted[W-1:0]};
    end
  end

  config_delay #(.N(DW)) u_dhi (.clk, .rst_n, .en, .sel(dly_hi), .d(hi_d), .q(hi), .q1(unused_h));
  config_delay #(.N(DW)) u_dlo (.clk, .rst_n, .en, .sel(dly_lo), .d(lo_d), .q(lo), .q1(unused_l));
endmodule
