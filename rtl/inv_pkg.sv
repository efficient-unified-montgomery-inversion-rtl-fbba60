// inv_pkg: types and constants shared by the blocks of the unified
// GF(p)/GF(2^n) Montgomery inverter.
//
// The datapath is four identical word slices, one per algorithm variable
// (u, v, r, s). A controller drives every slice with a slice_cfg_t each
// clock: which registers feed the two operands, whether the operands are
// shifted left before the add, add or subtract, and how far the result is
// shifted right afterwards. flags_t is what the flag trackers report about
// the value a slice last wrote: its bit length, its sign and its three
// least significant bits.
package inv_pkg;

  // Width of bit-length and iteration counters (covers 65535-bit operands).
  localparam int BSW = 16;

  // Operand sources of a slice. SRC_S reads s wherever it currently lives
  // (see s_loc); SRC_ONE is the constant 1 (word 0 = 1, other words 0).
  typedef enum logic [2:0] {
    SRC_ZERO = 3'd0,
    SRC_ONE  = 3'd1,
    SRC_U    = 3'd2,
    SRC_V    = 3'd3,
    SRC_R    = 3'd4,
    SRC_S    = 3'd5,
    SRC_P    = 3'd6
  } src_e;

  // Physical registers, also used as slice indices.
  typedef enum logic [1:0] {
    VAR_U = 2'd0,
    VAR_V = 2'd1,
    VAR_R = 2'd2,
    VAR_S = 2'd3
  } var_e;

  typedef struct packed {
    logic       we;    // slice writes its register in this pass
    src_e       xsrc;  // operand x
    src_e       ysrc;  // operand y
    logic       sub;   // 1: x - y (GF(p) only; XOR in GF(2^n))
    logic [1:0] xshl;  // x is shifted left by this many bits first
    logic [1:0] yshl;  // y is shifted left by this many bits first
    logic [1:0] shr;   // result is shifted right by this many bits
  } slice_cfg_t;

  typedef slice_cfg_t [3:0] ctrl_t;  // indexed by var_e

  typedef struct packed {
    logic [BSW-1:0] bitsize;  // index of highest set bit + 1 (0 for zero)
    logic           sign;     // MSB of the top word
    logic [2:0]     low;      // bits 2..0 of word 0
  } flags_t;

  // Phase I opcodes (Algorithm C steps 3-12) and the passes of Phase II.
  typedef enum logic [3:0] {
    OP_NONE     = 4'd0,
    OP_INIT     = 4'd1,  // u:=p, v:=a, r:=0, s:=1
    OP_USHR     = 4'd2,  // u:=u/2^t, s:=2^t s
    OP_VSHR     = 4'd3,  // v:=v/2^t, r:=2^t r
    OP_USUB     = 4'd4,  // u:=(u-v)/2, r:=r+s, s:=2s
    OP_VSUB     = 4'd5,  // v:=(v-u)/2, s:=s+r, r:=2r
    OP_NEG_EVEN = 4'd6,  // u:=-u/2, s:=2s, r:=-r
    OP_NEG_ODD  = 4'd7,  // v:=(v+u)/2, u:=-u, s:=s-r, r:=-2r
    OP_FIXA     = 4'd8,  // u:=s+p, v:=s+2p, s:=s
    OP_FIXB     = 4'd9,  // u:=s-p, v:=s-2p, s:=s
    OP_DOUBLE   = 4'd10  // u:=2^t s - c p, v:=2^t s - (1+c) p
  } op_e;

  function automatic slice_cfg_t mk_cfg(input src_e x, input src_e y, input logic sub,
                                     input logic [1:0] xshl = 2'd0,
                                     input logic [1:0] yshl = 2'd0,
                                     input logic [1:0] shr = 2'd0);
    slice_cfg_t c;
    c.we   = 1'b1;
    c.xsrc = x;
    c.ysrc = y;
    c.sub  = sub;
    c.xshl = xshl;
    c.yshl = yshl;
    c.shr  = shr;
    return c;
  endfunction

  localparam slice_cfg_t CFG_IDLE = '{we: 1'b0, xsrc: SRC_ZERO, ysrc: SRC_ZERO,
                                      sub: 1'b0, xshl: 2'd0, yshl: 2'd0, shr: 2'd0};

endpackage
