// flag_tracker: bitsize, sign and parity of the value a slice is writing.
//
// While a slice streams its result out word by word, this block computes
// the bit length of the result in a temporary register (bitsize_tmp): every
// non-zero word j sets it to j*W + bitlen(word), so after the top word it
// holds the bit length of the whole value. The three least significant bits
// are taken from word 0 (for the parity tests and the three-bit shifting),
// and the sign from the MSB of the top word. In the last cycle of a pass
// (m = e) the completed values are committed to the flag register, so the
// controller can choose the next operation in the very next cycle, without
// disturbing the flags it used for the current one. The flag register only
// changes in passes where the slice writes (we = 1).
//
// Timing: z_lo is result word m-1 (valid for m >= 1), z_top is word e
// (valid when last). The bit length of a negative value is meaningless.
// Word-by-word bit-length computation with a temporary register follows the
// inverter's description; one tracker per slice is this design's choice.
module flag_tracker
  import inv_pkg::*;
#(
  parameter int W     = 32,
  parameter int WORDS = 5,
  localparam int MW   = $clog2(WORDS + 2)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [MW-1:0] m,
  input  logic [MW-1:0] e,
  input  logic          first,
  input  logic          last,
  input  logic          we,
  input  logic [W-1:0]  z_lo,
  input  logic [W-1:0]  z_top,
  output flags_t        flags
);

  logic [BSW-1:0] bitsize_tmp, bs_lo, bs_fin;
  logic [2:0]     low_tmp, low_fin;

  function automatic logic [BSW-1:0] bitlen(input logic [W-1:0] x);
    bitlen = '0;
    for (int i = 0; i < W; i++)
      if (x[i]) bitlen = BSW'(i + 1);
  endfunction

  always_comb begin
    bs_lo = first ? '0 : bitsize_tmp;
    if (!first && z_lo != '0)
      bs_lo = BSW'(32'(m - 1'b1) * W) + bitlen(z_lo);
    bs_fin = bs_lo;
    if (z_top != '0)
      bs_fin = BSW'(32'(e) * W) + bitlen(z_top);
    low_fin = (m == MW'(1)) ? z_lo[2:0] : low_tmp;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bitsize_tmp <= '0;
      low_tmp     <= '0;
      flags       <= '0;
    end else begin
      bitsize_tmp <= bs_lo;
      if (m == MW'(1)) low_tmp <= z_lo[2:0];
      if (last && we) begin
        flags.bitsize <= bs_fin;
        flags.sign    <= z_top[W-1];
        flags.low     <= low_fin;
      end
    end
  end

endmodule
