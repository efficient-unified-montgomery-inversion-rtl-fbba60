// word_slice: one of the four identical arithmetic slices of the adder block.
//
// Per clock it takes word m of two operands x and y, shifts each left by
// 0..3 bits (bidir_shifter, left), adds or subtracts them in a WDFA/S with
// the carry kept in a register between words, and shifts the result right
// by 0..3 bits (bidir_shifter, right). So one pass over the words computes
//   z = ((x << xshl) +/- (y << yshl)) >> shr
// (XOR instead of +/- in GF(2^n) mode). Because a right shift needs the
// next word, z_lo is result word m-1, delivered while word m is processed;
// z_top is the top result word, valid in the cycle the top input word is
// processed. A left or no shift uses the same one-word delay, so every
// operation writes back identically.
// Folding the shift of (u - v)/2 into the adder's output follows the
// inverter's description; the left pre-shift of the operands (used for
// 2^t s, -2r and 2p) is this design's way of doing the other shifts.
module word_slice
  import inv_pkg::*;
#(
  parameter int W = 32
) (
  input  logic         clk,
  input  logic         first,
  input  logic         fsel,
  input  slice_cfg_t   cfg,
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  output logic [W-1:0] z_lo,
  output logic [W-1:0] z_top
);

  logic [W-1:0] xs, ys, xs_top, ys_top, sum;
  logic         carry_q, cin, cout;

  bidir_shifter #(.W(W)) u_xshl (
    .clk, .first, .dir_right(1'b0), .amt(cfg.xshl), .din(x), .dout(xs), .dtop(xs_top)
  );
  bidir_shifter #(.W(W)) u_yshl (
    .clk, .first, .dir_right(1'b0), .amt(cfg.yshl), .din(y), .dout(ys), .dtop(ys_top)
  );

  // Borrow-in of a subtraction is the +1 of the two's complement.
  assign cin = first ? cfg.sub : carry_q;

  wdfas #(.W(W)) u_add (
    .a(xs), .b(ys), .sub(cfg.sub), .fsel, .cin, .z(sum), .cout
  );

  always_ff @(posedge clk) carry_q <= cout;

  bidir_shifter #(.W(W)) u_shr (
    .clk, .first, .dir_right(1'b1), .amt(cfg.shr), .din(sum), .dout(z_lo), .dtop(z_top)
  );

  logic unused;
  assign unused = ^{xs_top, ys_top};

endmodule
