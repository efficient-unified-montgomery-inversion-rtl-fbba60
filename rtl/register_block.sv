// register_block: word-addressed storage of u, v, r, s and the modulus p.
//
// Each variable is WORDS+1 words of W bits: words 0..e-1 hold the operand
// precision and word e holds the extra high bits (the two extra bits of r and
// s, the sign of u, and bit n of p(x) in GF(2^n) mode), sign-extended.
// All five registers are read at the same word index rd_idx each clock
// (combinational read). Each of u, v, r, s has two write ports, because a
// pass ends by writing word e-1 (delayed by the right shifter) and word e in
// the same clock. The modulus register is written only by the host (ld_sel
// = 0); ld_sel = 1 writes the operand a into v. The host read port returns
// one word of the register chosen by h_sel (the result s).
// The four variable registers follow the inverter's description; the
// modulus register, the extra top word and the host ports are this
// design's choices.
module register_block
  import inv_pkg::*;
#(
  parameter int W     = 32,
  parameter int WORDS = 5,
  localparam int IW   = $clog2(WORDS + 1)
) (
  input  logic               clk,
  input  logic [IW-1:0]      rd_idx,
  output logic [W-1:0]       rd_u,
  output logic [W-1:0]       rd_v,
  output logic [W-1:0]       rd_r,
  output logic [W-1:0]       rd_s,
  output logic [W-1:0]       rd_p,
  input  logic [3:0]         we_lo,
  input  logic [IW-1:0]      wr_idx,
  input  logic [3:0][W-1:0]  wd_lo,
  input  logic [3:0]         we_top,
  input  logic [IW-1:0]      top_idx,
  input  logic [3:0][W-1:0]  wd_top,
  input  logic               ld_we,
  input  logic               ld_sel,
  input  logic [IW-1:0]      ld_idx,
  input  logic [W-1:0]       ld_data,
  input  var_e               h_sel,
  input  logic [IW-1:0]      h_idx,
  output logic [W-1:0]       h_data
);

  logic [W-1:0] mem [4][WORDS+1];
  logic [W-1:0] pmem [WORDS+1];

  always_ff @(posedge clk) begin
    for (int i = 0; i < 4; i++) begin
      if (we_lo[i])  mem[i][wr_idx]  <= wd_lo[i];
      if (we_top[i]) mem[i][top_idx] <= wd_top[i];
    end
    if (ld_we && ld_sel)  mem[VAR_V][ld_idx] <= ld_data;
    if (ld_we && !ld_sel) pmem[ld_idx] <= ld_data;
  end

  assign rd_u   = mem[VAR_U][rd_idx];
  assign rd_v   = mem[VAR_V][rd_idx];
  assign rd_r   = mem[VAR_R][rd_idx];
  assign rd_s   = mem[VAR_S][rd_idx];
  assign rd_p   = pmem[rd_idx];
  assign h_data = mem[h_sel][h_idx];

endmodule
