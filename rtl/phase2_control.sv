// phase2_control: final reduction and Phase II of the inverter
// (Algorithm C steps 15-31, with the three-bit shifting of Phase II).
//
// Started when Phase I ends, with s in [-2p, 2p] and k. Two reduction
// passes bring s into [0, p) (GF(p)) or below degree n (GF(2^n)):
//   pass A: u := s + p, v := s + 2p, s := s
//           GF(p): if s < 0 take u, or v when u < 0 as well.
//           GF(2^n): if s has bit n+1 take v = s + x p(x).
//   pass B: u := s - p, v := s - 2p, s := s
//           GF(p): take v if v >= 0, else u if u >= 0, else s.
//           GF(2^n): if s has bit n take u = s + p(x).
// Then 2n - k doublings modulo p, up to three per pass. From the bit length
// b of s: b = n uses one step u := 2s - p (v := 2s - 2p); otherwise
// t = min(3, n - b) zero top bits allow u := 2^t s, v := 2^t s - p in one
// pass. t never exceeds the number of doublings still owed. The new s is v
// if v >= 0 and u otherwise (always u in GF(2^n), where both candidates are
// carry-free and u is already reduced).
// Each candidate goes to its own register; instead of copying the winner
// back into s, a pointer s_loc records which register holds s. The choice is
// made at word 0 of the following pass from the flags committed at the end
// of the previous one, so every pass is e+1 clocks with no gaps.
// done pulses one clock after the last pass; s_loc then names the result.
// The r slice is never used here, so its configuration outputs are constant.
// The reduction and the two-candidate selection follow the algorithm; the
// s_loc pointer and the exact split of the GF(2^n) reduction over the two
// passes are this design's choices.
module phase2_control
  import inv_pkg::*;
#(
  parameter int WORDS = 5,
  localparam int MW   = $clog2(WORDS + 2)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              fsel,
  input  logic [BSW-1:0]    n_bits,
  input  logic [BSW-1:0]    k,
  input  logic [MW-1:0]     e,
  input  flags_t [3:0]      flags,
  output ctrl_t             ctrl,
  output logic [MW-1:0]     m,
  output logic              first,
  output logic              last,
  output logic              busy,
  output logic              done,
  output var_e              s_loc,
  output logic [BSW-1:0]    iters
);

  typedef enum logic [1:0] {S_IDLE, S_FIXA, S_FIXB, S_LOOP} state_e;
  state_e state;

  var_e           loc_q, loc_new;
  logic           after_fixb;
  logic [BSW:0]   rem_q;
  logic [BSW-1:0] b, gap;
  logic [1:0]     t_q, t_new;
  logic           c_q, c_new;
  op_e            op;

  flags_t fu, fv, fs;
  assign fu = flags[VAR_U];
  assign fv = flags[VAR_V];
  assign fs = flags[VAR_S];

  // Where s lives after the pass that has just finished.
  always_comb begin
    loc_new = loc_q;
    if (state == S_FIXB) begin
      if (fsel) loc_new = (fs.bitsize >= n_bits + BSW'(2)) ? VAR_V : VAR_S;
      else      loc_new = fs.sign ? (fu.sign ? VAR_V : VAR_U) : VAR_S;
    end else if (state == S_LOOP && after_fixb) begin
      if (fsel)          loc_new = (fu.bitsize <= n_bits) ? VAR_U : VAR_S;
      else if (!fv.sign) loc_new = VAR_V;
      else if (!fu.sign) loc_new = VAR_U;
      else               loc_new = VAR_S;
    end else if (state == S_LOOP) begin
      loc_new = (fsel || fv.sign) ? VAR_U : VAR_V;
    end
  end

  // Shift amount of the next doubling pass.
  always_comb begin
    b     = flags[loc_new].bitsize;
    c_new = (b >= n_bits);
    gap   = c_new ? '0 : n_bits - b;
    if (c_new)              t_new = 2'd1;
    else if (gap >= 3)      t_new = 2'd3;
    else                    t_new = gap[1:0];
    if ((BSW+1)'(t_new) > rem_q) t_new = rem_q[1:0];
  end

  always_comb begin
    op = OP_NONE;
    unique case (state)
      S_FIXA: op = OP_FIXA;
      S_FIXB: op = OP_FIXB;
      S_LOOP: op = (m == '0 && rem_q == '0) ? OP_NONE : OP_DOUBLE;
      default: op = OP_NONE;
    endcase
  end

  always_comb begin
    logic [1:0] t;
    logic       c;
    t = (m == '0) ? t_new : t_q;
    c = (m == '0) ? c_new : c_q;
    ctrl = '{default: CFG_IDLE};
    unique case (op)
      OP_FIXA: begin
        ctrl[VAR_U] = mk_cfg(SRC_S, SRC_P,    1'b0);
        ctrl[VAR_V] = mk_cfg(SRC_S, SRC_P,    1'b0, 2'd0, 2'd1);
        ctrl[VAR_S] = mk_cfg(SRC_S, SRC_ZERO, 1'b0);
      end
      OP_FIXB: begin
        ctrl[VAR_U] = mk_cfg(SRC_S, SRC_P,    1'b1);
        ctrl[VAR_V] = mk_cfg(SRC_S, SRC_P,    1'b1, 2'd0, 2'd1);
        ctrl[VAR_S] = mk_cfg(SRC_S, SRC_ZERO, 1'b0);
      end
      OP_DOUBLE: begin
        ctrl[VAR_U] = mk_cfg(SRC_S, c ? SRC_P : SRC_ZERO, 1'b1, t);
        ctrl[VAR_V] = mk_cfg(SRC_S, SRC_P, 1'b1, t, {1'b0, c});
      end
      default: ;
    endcase
  end

  assign busy  = state != S_IDLE;
  assign first = busy && m == '0;
  assign last  = busy && m == e;
  assign s_loc = (state == S_FIXA) ? VAR_S : (m == '0 ? loc_new : loc_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      m          <= '0;
      loc_q      <= VAR_S;
      after_fixb <= 1'b0;
      rem_q      <= '0;
      t_q        <= 2'd1;
      c_q        <= 1'b0;
      done       <= 1'b0;
      iters      <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          m <= '0;
          if (start) begin
            state <= S_FIXA;
            loc_q <= VAR_S;
            rem_q <= {n_bits, 1'b0} - {1'b0, k};
            iters <= '0;
          end
        end
        S_FIXA: begin
          m <= (m == e) ? '0 : m + 1'b1;
          if (m == e) state <= S_FIXB;
        end
        S_FIXB: begin
          if (m == '0) loc_q <= loc_new;
          m <= (m == e) ? '0 : m + 1'b1;
          if (m == e) begin
            state      <= S_LOOP;
            after_fixb <= 1'b1;
          end
        end
        S_LOOP: begin
          if (m == '0) begin
            loc_q      <= loc_new;
            after_fixb <= 1'b0;
          end
          if (m == '0 && rem_q == '0) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            m <= (m == e) ? '0 : m + 1'b1;
            if (m == '0) begin
              t_q   <= t_new;
              c_q   <= c_new;
              rem_q <= rem_q - (BSW+1)'(t_new);
              iters <= iters + 1'b1;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
