// tb_adder_block: gives the four slices random configurations (operand
// sources including the s pointer and the constant 1, left pre-shifts,
// add/subtract, right post-shift, both fields) over random multi-word
// operands, and compares every result word with the whole-value formula
//   ((x << xshl) +/- (y << yshl)) >>> shr   (XOR in GF(2^n) mode)
// computed on (e+1)*W-bit two's complement numbers.
module tb_adder_block;
  import inv_pkg::*;
  localparam int W = 8, NE = 3, NB = (NE + 1) * W;
  typedef logic [NB-1:0] val_t;

  logic              clk = 1'b0, first = 1'b0, fsel = 1'b0;
  ctrl_t             cfg;
  var_e              s_loc = VAR_S;
  logic [W-1:0]      rd_u, rd_v, rd_r, rd_s, rd_p;
  logic [3:0][W-1:0] z_lo, z_top;
  val_t              regs [5];
  int                m;
  int checks = 0, failures = 0;

  adder_block #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  assign rd_u = regs[0][m*W +: W];
  assign rd_v = regs[1][m*W +: W];
  assign rd_r = regs[2][m*W +: W];
  assign rd_s = regs[3][m*W +: W];
  assign rd_p = regs[4][m*W +: W];

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic val_t operand(input src_e s);
    case (s)
      SRC_ONE: return val_t'(1);
      SRC_U:   return regs[0];
      SRC_V:   return regs[1];
      SRC_R:   return regs[2];
      SRC_S:   return regs[s_loc];
      SRC_P:   return regs[4];
      default: return '0;
    endcase
  endfunction

  initial begin
    val_t exp_v [4], got [4], xa, ya, zz;
    m = 0;
    cfg = '{default: CFG_IDLE};
    for (int it = 0; it < 1500; it++) begin
      fsel = $urandom;
      for (int i = 0; i < 5; i++) begin
        regs[i] = {$urandom, $urandom, $urandom};
        if (fsel) regs[i][NB-1 -: 4] = '0;
      end
      s_loc = var_e'($urandom_range(0, 3));
      for (int i = 0; i < 4; i++) begin
        cfg[i] = mk_cfg(src_e'($urandom_range(0, 6)), src_e'($urandom_range(0, 6)), 1'(($urandom)),
                        2'($urandom), 2'($urandom), 2'($urandom));
        xa = operand(cfg[i].xsrc) << cfg[i].xshl;
        ya = operand(cfg[i].ysrc) << cfg[i].yshl;
        if (fsel) zz = xa ^ ya;
        else zz = cfg[i].sub ? xa - ya : xa + ya;
        exp_v[i] = val_t'($signed(zz) >>> cfg[i].shr);
      end
      for (int mm = 0; mm <= NE; mm++) begin
        @(negedge clk);
        m = mm;
        first = (mm == 0);
        #1;
        for (int i = 0; i < 4; i++) begin
          if (mm > 0) got[i][(mm-1)*W +: W] = z_lo[i];
          if (mm == NE) got[i][NE*W +: W] = z_top[i];
        end
      end
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (got[i] != exp_v[i]) begin
          failures++;
          if (failures < 10) $display("FAIL slice %0d cfg=%p fsel=%0d got=%h exp=%h", i, cfg[i], fsel, got[i], exp_v[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
