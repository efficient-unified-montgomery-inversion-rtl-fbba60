// adder_block: the adder building block of the inverter datapath.
//
// Four identical word slices, one per variable: slice VAR_U produces z_u,
// VAR_V z_v, VAR_R z_r and VAR_S z_s. Each clock every slice reads word m of
// the registers through its own operand multiplexers, so four updates such
// as (u - v)/2, r + s, 2s and a negation 0 - u proceed in parallel on the
// same word. The extra two slices stand in for the two negators: a negation
// is 0 - x in a slice. SRC_S selects whichever physical register currently
// holds s (s_loc), which lets the final reduction and Phase II keep s in u
// or v instead of copying it back. SRC_ONE is the constant 1.
//
// Timing: z_lo[i] is result word m-1 and z_top[i] the top result word, as
// described in word_slice. Word 0 of a pass is marked by 'first'.
// Four WDFA/S slices follow the described implementation; the s pointer
// input is this design's own addition.
module adder_block
  import inv_pkg::*;
#(
  parameter int W = 32
) (
  input  logic               clk,
  input  logic               first,
  input  logic               fsel,
  input  ctrl_t              cfg,
  input  var_e               s_loc,
  input  logic [W-1:0]       rd_u,
  input  logic [W-1:0]       rd_v,
  input  logic [W-1:0]       rd_r,
  input  logic [W-1:0]       rd_s,
  input  logic [W-1:0]       rd_p,
  output logic [3:0][W-1:0]  z_lo,
  output logic [3:0][W-1:0]  z_top
);

  logic [W-1:0] s_word;

  always_comb begin
    unique case (s_loc)
      VAR_U:   s_word = rd_u;
      VAR_V:   s_word = rd_v;
      VAR_R:   s_word = rd_r;
      default: s_word = rd_s;
    endcase
  end

  function automatic logic [W-1:0] pick(input src_e src);
    unique case (src)
      SRC_ONE: pick = first ? W'(1) : '0;
      SRC_U:   pick = rd_u;
      SRC_V:   pick = rd_v;
      SRC_R:   pick = rd_r;
      SRC_S:   pick = s_word;
      SRC_P:   pick = rd_p;
      default: pick = '0;
    endcase
  endfunction

  for (genvar i = 0; i < 4; i++) begin : g_slice
    logic [W-1:0] x, y;
    assign x = pick(cfg[i].xsrc);
    assign y = pick(cfg[i].ysrc);
    word_slice #(.W(W)) u_slice (
      .clk, .first, .fsel, .cfg(cfg[i]), .x, .y, .z_lo(z_lo[i]), .z_top(z_top[i])
    );
  end

endmodule
