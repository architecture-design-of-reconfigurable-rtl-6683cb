// rapid_pkg: types and constants shared by the RaPiD-Benchmark datapath,
// control path and instruction generator.
//
// Every datapath word carries a 16-bit value and one tag bit; the tag marks
// a value produced by an overflow and is ORed into every later result.  A
// cell has 14 data tracks and 32 control tracks, 20 input multiplexers,
// 14 functional-unit outputs and 15 bus connectors, as in the RaPiD-Benchmark
// cell.  The bit encodings (ALU opcodes, connector modes, C-instruction
// format) are this design's own choices.
package rapid_pkg;

  localparam int W       = 16;               // data width
  localparam int DW      = W + 1;            // data + tag
  localparam int T       = 14;               // data tracks
  localparam int TSEL_W  = 4;                // ceil(lg(T+1))
  localparam int CT      = 32;               // control tracks
  localparam int CSEL_W  = 6;                // GND + 32 tracks
  localparam int NMUX    = 20;               // input multiplexers per cell
  localparam int NOUT    = 14;               // functional-unit outputs per cell
  localparam int NBC     = 15;               // bus connectors per cell
  localparam int NSOFT   = 104;              // soft control bits per cell
  localparam int NLUT    = 3;                // 3-LUTs per control cell
  localparam int NALU    = 3;

  typedef struct packed {
    logic         tag;
    logic [W-1:0] d;
  } word_t;

  // ALU operations (4-bit soft field)
  typedef enum logic [3:0] {
    ALU_PASS = 4'd0,   // y = a
    ALU_ADD  = 4'd1,   // y = a + b + cin
    ALU_SUB  = 4'd2,   // y = a - b - cin (borrow in)
    ALU_ABSD = 4'd3,   // y = |a - b| (signed)
    ALU_AND  = 4'd4,
    ALU_OR   = 4'd5,
    ALU_XOR  = 4'd6,
    ALU_NOTA = 4'd7,
    ALU_MIN  = 4'd8,   // signed minimum
    ALU_MAX  = 4'd9,   // signed maximum
    ALU_ADDU = 4'd10,  // y = a + b + cin, unsigned overflow sets tag
    ALU_SUBU = 4'd11   // y = a - b - cin, unsigned overflow sets tag
  } alu_op_e;

  typedef struct packed {
    alu_op_e op;
    logic    cin;      // carry (or borrow) in, from the control path
    logic    acc;      // operand a is the ALU's own output register
  } alu_soft_t;        // 6 soft bits

  // bus connector modes (2 hard bits)
  typedef enum logic [1:0] {
    BC_OPEN  = 2'd0,
    BC_RIGHT = 2'd1,   // left segment drives right segment
    BC_LEFT  = 2'd2    // right segment drives left segment
  } bc_mode_e;

  typedef struct packed {
    bc_mode_e   mode;
    logic [1:0] dly;
  } bc_cfg_t;

  typedef struct packed {
    logic [4:0] shift;   // right shift of the 32-bit product
    logic       sgn;     // signed operands
    logic       rnd;     // round before shifting
    logic       tag_en;  // propagate input tags
  } mult_cfg_t;          // 8 hard bits

  // Soft control of one datapath cell (104 bits), produced each cycle by
  // the control path: 20 multiplexer selects, 3 ALU fields, 3 RAM fields
  // (ram[i] = {we, inc}).
  typedef struct packed {
    logic [NMUX-1:0][TSEL_W-1:0] mux;
    alu_soft_t [NALU-1:0]         alu;
    logic [2:0][1:0]              ram;
  } dp_soft_t;

  // Hard control of one datapath cell (292 bits).
  typedef struct packed {
    logic [NOUT-1:0][T-1:0] drv;      // 196 tristate driver enables
    logic [5:0][1:0]        gpr_dly;  // GP register ConfigDelays
    logic [NALU-1:0][1:0]   alu_dly;  // ALU output ConfigDelays
    logic [1:0][1:0]        mul_dly;  // multiplier hi/lo ConfigDelays
    bc_cfg_t [NBC-1:0]      bc;       // 15 bus connectors (mode + delay)
    logic [NALU-1:0]        alu_tag_en;
    logic [2:0]             ram_ext_addr; // 1: address from datapath
    mult_cfg_t              mul;
  } dp_hard_t;

  typedef struct packed {
    logic [CSEL_W-1:0] sel;   // 0 = GND, k = control track k-1
    logic              inv;
    logic [1:0]        dly;
  } oinv_cfg_t;

  typedef struct packed {
    logic [2:0][4:0]   in_sel;  // control track feeding each LUT input
    logic [7:0]        tt;      // truth table
    logic [1:0]        dly;
    logic [CT-1:0]     drv;     // output drivers onto control tracks
  } lut_cfg_t;

  typedef struct packed {
    oinv_cfg_t [NSOFT-1:0]   oinv;
    lut_cfg_t  [NLUT-1:0]    lut;
    logic [NALU-1:0][CT-1:0] st_drv;  // ALU status drivers onto control tracks
    bc_cfg_t   [CT-1:0]      bc;      // control-track bus connectors
  } cp_cfg_t;

  typedef struct packed {
    dp_hard_t dp;
    cp_cfg_t  cp;
  } cell_cfg_t;

  localparam int CELL_CFG_BITS = $bits(cell_cfg_t);

  localparam int NS      = 3;    // input streams = output streams
  localparam int IBSEL_W = 5;    // 0 = none, k = instruction bit k-1 (16-bit word)

  // Configuration of the array ends: stream FIFOs and instruction entry.
  typedef struct packed {
    logic [NS-1:0][T-1:0]      in_drv;   // input FIFO drivers onto left-edge segments
    logic [NS-1:0][TSEL_W-1:0] out_sel;  // output FIFO multiplexers at the right edge
    logic [CT-1:0][IBSEL_W-1:0] ib_sel;  // instruction bit entering each control track
    oinv_cfg_t [2*NS-1:0]      strm;     // in_rd[0..2], out_wr[0..2] soft signals
  } edge_cfg_t;

  // C-instructions of the programmed controllers and address generators
  typedef enum logic [2:0] {
    C_HALT   = 3'd0,
    C_INST   = 3'd1,   // issue payload CNT times
    C_LOOP   = 3'd2,   // loop CNT times over PC+1 .. LAST
    C_SIGNAL = 3'd3,   // signal controller NUM
    C_WAIT   = 3'd4    // repeat payload until signalled
  } cop_e;

endpackage
