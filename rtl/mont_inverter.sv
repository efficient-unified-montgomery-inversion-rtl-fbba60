// mont_inverter: scalable, unified GF(p) / GF(2^n) Montgomery inverter with
// three-bit shifting.
//
// Computes the Montgomery inverse b = a^-1 * 2^(2n) mod p of an odd modulus
// p of n bits (fsel = 0), or b(x) = a(x)^-1 * x^(2n) mod p(x) for a
// polynomial p(x) of degree n (fsel = 1), with one datapath for both fields.
// Operands are held as e = ceil(n/W) words plus one top word, and every
// operation streams through W-bit slices one word per clock, so the same
// hardware serves any n up to W*WORDS bits; each loop iteration takes e+1
// clocks.
//
// Structure: register_block (u, v, r, s, p) feeds adder_block (four word
// slices, each a WDFA/S between two bidirectional shifters); four
// flag_trackers report bit length, sign and low bits of what the slices
// write. main_control runs initialisation and Phase I (the bit-length
// compared, sign-correcting variant of Montgomery's almost-inverse loop, with
// three-bit right shifts of u and v). phase2_control then brings s into
// range in two passes and performs the 2n-k modular doublings of Phase II,
// up to three per pass.
//
// Interface: while idle, the host writes words 0..e of p (ld_sel = 0) and of
// a (ld_sel = 1), top word included (0 for GF(p); it carries bit n of p(x)
// when n is a multiple of W). Then it pulses start with fsel and n_bits
// stable until done. done pulses for one clock when b is ready; rd_idx
// then reads word rd_idx of b on rd_data (combinational). k_out is the
// Phase I count k, ph1_iters / ph2_iters the loop passes of each phase.
// Latency, from the clock edge that samples start to the one that raises
// done: (e+1) * (3 + ph1_iters + ph2_iters) + 4 clocks (one to accept start,
// two hand-over cycles between the controllers, one to raise done).
// Requirements: a in [1, p-1] and gcd(a, p) = 1, p odd with its top bit at
// n-1 (GF(p)); deg a < n and gcd(a(x), p(x)) = 1 (GF(2^n)).
// The algorithm, the block structure and the e+1 clocks per iteration follow
// the inverter's description; the host interface, the reset and the
// controller hand-over clocks are this design's choices.
module mont_inverter
  import inv_pkg::*;
#(
  parameter int W     = 32,
  parameter int WORDS = 5,
  localparam int IW   = $clog2(WORDS + 1),
  localparam int MW   = $clog2(WORDS + 2)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic           fsel,
  input  logic [BSW-1:0] n_bits,
  input  logic           ld_we,
  input  logic           ld_sel,
  input  logic [IW-1:0]  ld_idx,
  input  logic [W-1:0]   ld_data,
  input  logic [IW-1:0]  rd_idx,
  output logic [W-1:0]   rd_data,
  output logic           busy,
  output logic           done,
  output logic [BSW-1:0] k_out,
  output logic [BSW-1:0] ph1_iters,
  output logic [BSW-1:0] ph2_iters
);

  logic [MW-1:0] e;
  assign e = MW'((32'(n_bits) + W - 1) / W);

  // Controllers.
  ctrl_t         ctrl1, ctrl2, ctrl;
  logic [MW-1:0] m1, m2, m;
  logic          first1, first2, first, last1, last2, last;
  logic          busy1, busy2, done1;
  var_e          s_loc2, s_loc;
  flags_t [3:0]  flags;

  main_control #(.WORDS(WORDS)) u_main (
    .clk, .rst_n, .start(start && !busy), .e,
    .flags_u(flags[VAR_U]), .flags_v(flags[VAR_V]),
    .ctrl(ctrl1), .m(m1), .first(first1), .last(last1),
    .busy(busy1), .done(done1), .k_out, .iters(ph1_iters)
  );

  phase2_control #(.WORDS(WORDS)) u_ph2 (
    .clk, .rst_n, .start(done1), .fsel, .n_bits, .k(k_out), .e, .flags,
    .ctrl(ctrl2), .m(m2), .first(first2), .last(last2),
    .busy(busy2), .done, .s_loc(s_loc2), .iters(ph2_iters)
  );

  assign ctrl  = busy2 ? ctrl2  : ctrl1;
  assign m     = busy2 ? m2     : m1;
  assign first = busy2 ? first2 : first1;
  assign last  = busy2 ? last2  : last1;
  assign s_loc = busy1 ? VAR_S  : s_loc2;
  assign busy  = busy1 || busy2 || done1;

  // Datapath.
  logic [W-1:0]      rd_u, rd_v, rd_r, rd_s, rd_p;
  logic [3:0][W-1:0] z_lo, z_top;
  logic [3:0]        we_lo, we_top;

  for (genvar i = 0; i < 4; i++) begin : g_we
    assign we_lo[i]  = ctrl[i].we && !first;
    assign we_top[i] = ctrl[i].we && last;
  end

  register_block #(.W(W), .WORDS(WORDS)) u_regs (
    .clk, .rd_idx(IW'(m)),
    .rd_u, .rd_v, .rd_r, .rd_s, .rd_p,
    .we_lo, .wr_idx(IW'(m - 1'b1)), .wd_lo(z_lo),
    .we_top, .top_idx(IW'(e)), .wd_top(z_top),
    .ld_we(ld_we && !busy), .ld_sel, .ld_idx, .ld_data,
    .h_sel(s_loc), .h_idx(rd_idx), .h_data(rd_data)
  );

  adder_block #(.W(W)) u_adders (
    .clk, .first, .fsel, .cfg(ctrl), .s_loc,
    .rd_u, .rd_v, .rd_r, .rd_s, .rd_p, .z_lo, .z_top
  );

  for (genvar i = 0; i < 4; i++) begin : g_flags
    flag_tracker #(.W(W), .WORDS(WORDS)) u_flags (
      .clk, .rst_n, .m, .e, .first, .last, .we(ctrl[i].we),
      .z_lo(z_lo[i]), .z_top(z_top[i]), .flags(flags[i])
    );
  end

endmodule
