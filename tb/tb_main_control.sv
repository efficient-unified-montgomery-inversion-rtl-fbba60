// tb_main_control: drives the Phase I controller with random flag values and
// checks, pass by pass, the slice configuration it issues against the
// opcode table of the algorithm, that the configuration holds for all e+1
// words even when the flags change mid-pass, the word counter and pass
// boundaries, the k and pass counters, and the done pulse when u = 0.
module tb_main_control;
  import inv_pkg::*;
  localparam int WORDS = 5, MW = $clog2(WORDS + 2);
  logic           clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [MW-1:0]  e = MW'(3);
  flags_t         flags_u = '0, flags_v = '0;
  ctrl_t          ctrl;
  logic [MW-1:0]  m;
  logic           first, last, busy, done;
  logic [BSW-1:0] k_out, iters;
  int checks = 0, failures = 0;

  main_control dut (.*);

  always #5 clk = ~clk;

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int tz(input logic [2:0] l);
    if (l[0]) return 0;
    if (l[1]) return 1;
    if (l[2]) return 2;
    return 3;
  endfunction

  function automatic ctrl_t expect_cfg(input flags_t fu, input flags_t fv, output int t);
    ctrl_t c = '{default: CFG_IDLE};
    t = 1;
    if (!fu.sign && !fu.low[0]) begin
      t = tz(fu.low);
      c[VAR_U] = mk_cfg(SRC_U, SRC_ZERO, 0, 0, 0, 2'(t));
      c[VAR_S] = mk_cfg(SRC_S, SRC_ZERO, 0, 2'(t), 0, 0);
    end else if (!fu.sign && !fv.low[0]) begin
      t = tz(fv.low);
      c[VAR_V] = mk_cfg(SRC_V, SRC_ZERO, 0, 0, 0, 2'(t));
      c[VAR_R] = mk_cfg(SRC_R, SRC_ZERO, 0, 2'(t), 0, 0);
    end else if (!fu.sign && fu.bitsize >= fv.bitsize) begin
      c[VAR_U] = mk_cfg(SRC_U, SRC_V, 1, 0, 0, 1);
      c[VAR_R] = mk_cfg(SRC_R, SRC_S, 0, 0, 0, 0);
      c[VAR_S] = mk_cfg(SRC_S, SRC_ZERO, 0, 1, 0, 0);
    end else if (!fu.sign) begin
      c[VAR_V] = mk_cfg(SRC_V, SRC_U, 1, 0, 0, 1);
      c[VAR_S] = mk_cfg(SRC_S, SRC_R, 0, 0, 0, 0);
      c[VAR_R] = mk_cfg(SRC_R, SRC_ZERO, 0, 1, 0, 0);
    end else if (!fu.low[0]) begin
      c[VAR_U] = mk_cfg(SRC_ZERO, SRC_U, 1, 0, 0, 1);
      c[VAR_R] = mk_cfg(SRC_ZERO, SRC_R, 1, 0, 0, 0);
      c[VAR_S] = mk_cfg(SRC_S, SRC_ZERO, 0, 1, 0, 0);
    end else begin
      c[VAR_V] = mk_cfg(SRC_V, SRC_U, 0, 0, 0, 1);
      c[VAR_U] = mk_cfg(SRC_ZERO, SRC_U, 1, 0, 0, 0);
      c[VAR_S] = mk_cfg(SRC_S, SRC_R, 1, 0, 0, 0);
      c[VAR_R] = mk_cfg(SRC_ZERO, SRC_R, 1, 0, 1, 0);
    end
    return c;
  endfunction

  task automatic chk(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (t=%0t) m=%0d ctrl=%p", msg, $time, m, ctrl);
    end
  endtask

  initial begin
    ctrl_t exp_c, init_c;
    int    t, ksum, npass;
    init_c = '{default: CFG_IDLE};
    init_c[VAR_U] = mk_cfg(SRC_P, SRC_ZERO, 0);
    init_c[VAR_V] = mk_cfg(SRC_V, SRC_ZERO, 0);
    init_c[VAR_R] = mk_cfg(SRC_ZERO, SRC_ZERO, 0);
    init_c[VAR_S] = mk_cfg(SRC_ONE, SRC_ZERO, 0);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 20; run++) begin
      e = MW'($urandom_range(1, WORDS));
      flags_u = '{bitsize: 16'd9, sign: 1'b0, low: 3'b001};
      @(negedge clk);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      // Initialisation pass.
      for (int mm = 0; mm <= e; mm++) begin
        #1;
        chk(ctrl == init_c && m == MW'(mm) && first == (mm == 0) && last == (mm == e) && busy, "init pass");
        @(negedge clk);
      end
      ksum = 0;
      npass = 0;
      for (int it = 0; it < 40; it++) begin
        flags_u = flags_t'($urandom);
        flags_u.bitsize = BSW'($urandom_range(1, 40));
        flags_v = flags_t'($urandom);
        flags_v.bitsize = BSW'($urandom_range(1, 40));
        exp_c = expect_cfg(flags_u, flags_v, t);
        ksum += t;
        npass++;
        for (int mm = 0; mm <= e; mm++) begin
          if (mm == 2) begin
            flags_u = ~flags_u;  // flags change mid-pass must not matter
            flags_u.bitsize = '0;
          end
          #1;
          chk(ctrl == exp_c && m == MW'(mm) && first == (mm == 0) && last == (mm == e), "Phase I pass");
          @(negedge clk);
        end
        chk(k_out == BSW'(ksum) && iters == BSW'(npass), "k and pass counters");
      end
      // u = 0: no writes, done pulse, back to idle.
      flags_u = '0;
      #1;
      chk(ctrl == '{default: CFG_IDLE} && busy && !done, "termination cycle");
      @(negedge clk);
      chk(done && !busy, "done pulse");
      @(negedge clk);
      chk(!done && !busy && k_out == BSW'(ksum), "idle after done");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
