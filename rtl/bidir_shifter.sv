// bidir_shifter: word-serial bidirectional shifter with a one-word tmp_reg.
//
// A multi-word operand streams through, least significant word first, one
// word per clock ('first' marks word 0). The previous word is kept in
// tmp_reg so that bits can cross the word boundary.
//   Left shift (dir_right = 0) by amt: dout is word m of (x << amt), formed
//   from the top amt bits of word m-1 and word m, in the same cycle.
//   Right shift (dir_right = 1) by amt: the bits that complete word m-1 are
//   the low amt bits of word m, so dout is word m-1 of (x >> amt), one
//   cycle late; dtop is the top word shifted with its sign bit copied in,
//   valid in the cycle the top word arrives.
// amt ranges over 0..3 to support the three-bit shifting of both phases.
// The one-word tmp_reg and the one-word lag of right shifts follow the
// inverter's description; one shared module for both directions is this
// design's choice.
module bidir_shifter #(
  parameter int W = 32
) (
  input  logic         clk,
  input  logic         first,
  input  logic         dir_right,
  input  logic [1:0]   amt,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout,
  output logic [W-1:0] dtop
);

  logic [W-1:0]   tmp_reg;
  logic [W-1:0]   prev;
  logic [2*W-1:0] pair;

  always_ff @(posedge clk) tmp_reg <= din;

  always_comb begin
    prev = first ? '0 : tmp_reg;
    if (dir_right) begin
      pair = {din, prev} >> amt;
      dout = pair[W-1:0];
    end else begin
      pair = {din, prev} << amt;
      dout = pair[2*W-1:W];
    end
    dtop = W'($signed(din) >>> amt);
  end

endmodule
