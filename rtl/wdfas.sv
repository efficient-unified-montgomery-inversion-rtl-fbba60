// wdfas: word dual-field adder/subtracter.
//
// One W-bit slice of a multi-word addition. In GF(p) mode (fsel = 0) it
// computes a + b + cin or, with sub = 1, a + ~b + cin (a - b when cin is 1
// on the least significant word), and passes the carry on to the next word.
// In GF(2^n) mode (fsel = 1) every carry is forced to zero, so the same
// ripple chain yields the carry-free sum a XOR b, which is both addition and
// subtraction of binary polynomials. Purely combinational; the caller keeps
// the carry between words in a register.
//
// The dual-field idea (one adder whose carries are switched off for
// GF(2^n)) follows the inverter's description; the ripple structure is this
// design's own choice.
module wdfas #(
  parameter int W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         sub,
  input  logic         fsel,
  input  logic         cin,
  output logic [W-1:0] z,
  output logic         cout
);

  logic [W-1:0] bx;
  logic [W:0]   c;

  assign bx   = (sub && !fsel) ? ~b : b;
  assign c[0] = cin && !fsel;

  for (genvar i = 0; i < W; i++) begin : g_bit
    assign z[i]   = a[i] ^ bx[i] ^ c[i];
    assign c[i+1] = !fsel && ((a[i] & bx[i]) | (a[i] & c[i]) | (bx[i] & c[i]));
  end

  assign cout = c[W];

endmodule
