// main_control: Phase I controller of the inverter (Algorithm C, steps 1-14).
//
// After 'start' it runs one initialisation pass (u := p, v := a, r := 0,
// s := 1; v is copied onto itself so that its flags are computed) and then
// one iteration per pass. A pass visits words m = 0..e, so it lasts e+1
// clocks. At m = 0 of each pass the opcode is chosen from the flags that the
// flag trackers committed at the end of the previous pass, and it is held
// for the rest of the pass:
//   u >= 0, u = 0          : Phase I ends (done pulse, no write)
//   u >= 0, u even         : u := u/2^t, s := 2^t s       (t = 1..3 trailing zeros)
//   u >= 0, v even         : v := v/2^t, r := 2^t r
//   bitsize(u) >= bitsize(v): u := (u-v)/2, r := r+s, s := 2s
//   otherwise              : v := (v-u)/2, s := s+r, r := 2r
//   u < 0, u even          : u := -u/2, s := 2s, r := -r
//   u < 0, u odd           : v := (v+u)/2, u := -u, s := s-r, r := -2r
// Comparing bit lengths instead of values is what lets u go negative; the
// two negative-u steps restore its sign in the next iteration at no extra
// cost. k counts the single-bit steps (a three-bit shift adds 3).
// In GF(2^n) mode u never becomes negative and the same table is
// Algorithm B. The three-bit shifting of u and v follows the inverter's
// description; restricting it to the u-even and v-even steps (not the
// negative-u step) is this design's choice.
module main_control
  import inv_pkg::*;
#(
  parameter int WORDS = 5,
  localparam int MW   = $clog2(WORDS + 2)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [MW-1:0]  e,
  input  flags_t         flags_u,
  input  flags_t         flags_v,
  output ctrl_t          ctrl,
  output logic [MW-1:0]  m,
  output logic           first,
  output logic           last,
  output logic           busy,
  output logic           done,
  output logic [BSW-1:0] k_out,
  output logic [BSW-1:0] iters
);

  typedef enum logic [1:0] {S_IDLE, S_INIT, S_LOOP} state_e;
  state_e state;

  op_e        op_q, op_new, op;
  logic [1:0] t_q, t_new, t;
  logic       u_zero;

  function automatic logic [1:0] tz3(input logic [2:0] low);
    if (low == 3'b000)      tz3 = 2'd3;
    else if (low[1:0] == 0) tz3 = 2'd2;
    else                    tz3 = 2'd1;
  endfunction

  function automatic ctrl_t op_cfg(input op_e o, input logic [1:0] sh);
    ctrl_t c;
    c = '{default: CFG_IDLE};
    unique case (o)
      OP_INIT: begin
        c[VAR_U] = mk_cfg(SRC_P,    SRC_ZERO, 1'b0);
        c[VAR_V] = mk_cfg(SRC_V,    SRC_ZERO, 1'b0);
        c[VAR_R] = mk_cfg(SRC_ZERO, SRC_ZERO, 1'b0);
        c[VAR_S] = mk_cfg(SRC_ONE,  SRC_ZERO, 1'b0);
      end
      OP_USHR: begin
        c[VAR_U] = mk_cfg(SRC_U, SRC_ZERO, 1'b0, 2'd0, 2'd0, sh);
        c[VAR_S] = mk_cfg(SRC_S, SRC_ZERO, 1'b0, sh);
      end
      OP_VSHR: begin
        c[VAR_V] = mk_cfg(SRC_V, SRC_ZERO, 1'b0, 2'd0, 2'd0, sh);
        c[VAR_R] = mk_cfg(SRC_R, SRC_ZERO, 1'b0, sh);
      end
      OP_USUB: begin
        c[VAR_U] = mk_cfg(SRC_U, SRC_V, 1'b1, 2'd0, 2'd0, 2'd1);
        c[VAR_R] = mk_cfg(SRC_R, SRC_S, 1'b0);
        c[VAR_S] = mk_cfg(SRC_S, SRC_ZERO, 1'b0, 2'd1);
      end
      OP_VSUB: begin
        c[VAR_V] = mk_cfg(SRC_V, SRC_U, 1'b1, 2'd0, 2'd0, 2'd1);
        c[VAR_S] = mk_cfg(SRC_S, SRC_R, 1'b0);
        c[VAR_R] = mk_cfg(SRC_R, SRC_ZERO, 1'b0, 2'd1);
      end
      OP_NEG_EVEN: begin
        c[VAR_U] = mk_cfg(SRC_ZERO, SRC_U, 1'b1, 2'd0, 2'd0, 2'd1);
        c[VAR_R] = mk_cfg(SRC_ZERO, SRC_R, 1'b1);
        c[VAR_S] = mk_cfg(SRC_S, SRC_ZERO, 1'b0, 2'd1);
      end
      OP_NEG_ODD: begin
        c[VAR_V] = mk_cfg(SRC_V, SRC_U, 1'b0, 2'd0, 2'd0, 2'd1);
        c[VAR_U] = mk_cfg(SRC_ZERO, SRC_U, 1'b1);
        c[VAR_S] = mk_cfg(SRC_S, SRC_R, 1'b1);
        c[VAR_R] = mk_cfg(SRC_ZERO, SRC_R, 1'b1, 2'd0, 2'd1);
      end
      default: ;
    endcase
    return c;
  endfunction

  // Opcode decision from the committed flags.
  always_comb begin
    u_zero = !flags_u.sign && flags_u.bitsize == '0;
    t_new  = 2'd1;
    if (!flags_u.sign) begin
      if (!flags_u.low[0]) begin
        op_new = OP_USHR;
        t_new  = tz3(flags_u.low);
      end else if (!flags_v.low[0]) begin
        op_new = OP_VSHR;
        t_new  = tz3(flags_v.low);
      end else if (flags_u.bitsize >= flags_v.bitsize) begin
        op_new = OP_USUB;
      end else begin
        op_new = OP_VSUB;
      end
    end else begin
      op_new = flags_u.low[0] ? OP_NEG_ODD : OP_NEG_EVEN;
    end
  end

  always_comb begin
    op = op_q;
    t  = t_q;
    if (state == S_LOOP && m == '0) begin
      op = u_zero ? OP_NONE : op_new;
      t  = t_new;
    end else if (state == S_INIT) begin
      op = OP_INIT;
    end else if (state == S_IDLE) begin
      op = OP_NONE;
    end
    ctrl = op_cfg(op, t);
  end

  assign busy  = state != S_IDLE;
  assign first = busy && m == '0;
  assign last  = busy && m == e;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      m     <= '0;
      op_q  <= OP_NONE;
      t_q   <= 2'd1;
      done  <= 1'b0;
      k_out <= '0;
      iters <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          m <= '0;
          if (start) begin
            state <= S_INIT;
            k_out <= '0;
            iters <= '0;
          end
        end
        S_INIT: begin
          m <= (m == e) ? '0 : m + 1'b1;
          if (m == e) state <= S_LOOP;
        end
        S_LOOP: begin
          if (m == '0 && u_zero) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            m <= (m == e) ? '0 : m + 1'b1;
            if (m == '0) begin
              op_q  <= op_new;
              t_q   <= t_new;
              k_out <= k_out + BSW'(t_new);
              iters <= iters + 1'b1;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
