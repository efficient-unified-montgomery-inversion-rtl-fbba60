// tb_phase2_control: drives the final-reduction / Phase II controller with
// random flags in both fields and checks the two reduction passes, which
// register it then names as s (s_loc) after each pass, the shift amount t and
// the s_{n-1} = 1 case of every doubling pass (configurations compared with
// the step formulas), that exactly 2n - k doublings are issued in total,
// the e+1-clock pass length and the done pulse.
module tb_phase2_control;
  import inv_pkg::*;
  localparam int WORDS = 5, MW = $clog2(WORDS + 2);
  logic           clk = 1'b0, rst_n = 1'b0, start = 1'b0, fsel = 1'b0;
  logic [BSW-1:0] n_bits = '0, k = '0;
  logic [MW-1:0]  e = MW'(2);
  flags_t [3:0]   flags = '0;
  ctrl_t          ctrl;
  logic [MW-1:0]  m;
  logic           first, last, busy, done;
  var_e           s_loc;
  logic [BSW-1:0] iters;
  int checks = 0, failures = 0;
  int seen_t[4], seen_c, seen_loc[4];

  phase2_control dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s (t=%0t) m=%0d s_loc=%0d", msg, $time, m, s_loc);
    end
  endtask

  task automatic rand_flags(input int n);
    for (int i = 0; i < 4; i++) begin
      flags[i] = flags_t'($urandom);
      flags[i].bitsize = BSW'($urandom_range(n > 5 ? n - 5 : 0, n + 2));
    end
  endtask

  // Run one pass and check that ctrl and s_loc hold the expected values.
  task automatic pass(input ctrl_t c, input var_e loc, input string what);
    for (int mm = 0; mm <= e; mm++) begin
      #1;
      chk(ctrl == c && s_loc == loc && m == MW'(mm) && first == (mm == 0) && last == (mm == e) && busy, what);
      @(negedge clk);
      if (mm == 0) flags = ~flags;  // later flag changes must not matter
    end
  endtask

  initial begin
    ctrl_t c;
    var_e  loc;
    int    n, rem, b, t, cc, total;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 60; run++) begin
      fsel   = run[0];
      n      = $urandom_range(4, 60);
      n_bits = BSW'(n);
      k      = BSW'($urandom_range(n, 2 * n));
      e      = MW'($urandom_range(1, WORDS));
      @(negedge clk);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      // Pass A.
      c = '{default: CFG_IDLE};
      c[VAR_U] = mk_cfg(SRC_S, SRC_P, 0);
      c[VAR_V] = mk_cfg(SRC_S, SRC_P, 0, 0, 1, 0);
      c[VAR_S] = mk_cfg(SRC_S, SRC_ZERO, 0);
      pass(c, VAR_S, "pass A");
      // Pass B, s chosen from pass A.
      rand_flags(n);
      if (!fsel) loc = flags[VAR_S].sign ? (flags[VAR_U].sign ? VAR_V : VAR_U) : VAR_S;
      else       loc = (flags[VAR_S].bitsize >= n + 2) ? VAR_V : VAR_S;
      seen_loc[loc]++;
      c[VAR_U] = mk_cfg(SRC_S, SRC_P, 1);
      c[VAR_V] = mk_cfg(SRC_S, SRC_P, 1, 0, 1, 0);
      c[VAR_S] = mk_cfg(SRC_S, SRC_ZERO, 0);
      pass(c, loc, "pass B");
      // Doubling passes.
      rem = 2 * n - int'(k);
      total = 0;
      for (int it = 0; ; it++) begin
        rand_flags(n);
        if (it == 0) begin
          if (!fsel) loc = !flags[VAR_V].sign ? VAR_V : (!flags[VAR_U].sign ? VAR_U : VAR_S);
          else       loc = (flags[VAR_U].bitsize <= n) ? VAR_U : VAR_S;
        end else begin
          loc = (fsel || flags[VAR_V].sign) ? VAR_U : VAR_V;
        end
        seen_loc[loc]++;
        if (rem == 0) break;
        // Keep s in range as in the real algorithm.
        if (flags[loc].bitsize > n) flags[loc].bitsize = BSW'(n);
        b  = flags[loc].bitsize;
        cc = (b == n);
        t  = cc ? 1 : (n - b > 3 ? 3 : n - b);
        if (t > rem) t = rem;
        seen_t[t]++;
        seen_c += cc;
        c = '{default: CFG_IDLE};
        c[VAR_U] = mk_cfg(SRC_S, cc ? SRC_P : SRC_ZERO, 1, 2'(t), 0, 0);
        c[VAR_V] = mk_cfg(SRC_S, SRC_P, 1, 2'(t), 2'(cc), 0);
        pass(c, loc, "doubling pass");
        rem -= t;
        total += t;
      end
      #1;
      chk(ctrl == '{default: CFG_IDLE} && s_loc == loc && !done, "final selection");
      @(negedge clk);
      chk(done && !busy && s_loc == loc && total == 2 * n - int'(k), "done and result location");
    end
    chk(seen_t[1] > 0 && seen_t[2] > 0 && seen_t[3] > 0 && seen_c > 0, "all shift amounts seen");
    chk(seen_loc[VAR_U] > 0 && seen_loc[VAR_V] > 0 && seen_loc[VAR_S] > 0, "all locations seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
