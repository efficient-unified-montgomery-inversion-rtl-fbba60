// tb_mont_inverter_full: the inverter at its default size (W = 32, five
// words, n up to 160), as in the 160-bit, 32-bit-word configuration.
//
// It runs inversions modulo the 160-bit prime 2^160 - 2^31 - 1 (including
// a = 1) and random odd 160-bit moduli, and in GF(2^n) modulo
// x^131 + x^8 + x^3 + x^2 + 1, x^113 + x^9 + 1 and random degree-160
// polynomials. Results are checked by their defining property, k and the pass
// counts against a behavioural model, and the clock count against
// (e+1)(3 + passes) + 4.
module tb_mont_inverter_full;
  import inv_pkg::*;
  import inv_ref_pkg::*;

  localparam int W      = 32;
  localparam int WORDS  = 5;
  localparam int IW     = $clog2(WORDS + 1);
  localparam int NTESTS = 12;

  logic           clk = 1'b0;
  logic           rst_n = 1'b0;
  logic           start = 1'b0, fsel = 1'b0;
  logic [BSW-1:0] n_bits = '0;
  logic           ld_we = 1'b0, ld_sel = 1'b0;
  logic [IW-1:0]  ld_idx = '0, rd_idx = '0;
  logic [W-1:0]   ld_data = '0, rd_data;
  logic           busy, done;
  logic [BSW-1:0] k_out, ph1_iters, ph2_iters;

  int checks = 0, failures = 0;
  int stats[18];
  int hw_ops[16];
  int hw_t1[4], hw_t2[4], hw_c, hw_fixb_loc[4], hw_gf2;

  mont_inverter dut (.*);

  always #5 clk = ~clk;

  initial begin
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Count what the hardware actually did.
  always @(posedge clk) begin
    if (dut.u_main.state == 2'd2 && dut.u_main.m == '0 && !dut.u_main.u_zero) begin
      hw_ops[dut.u_main.op_new]++;
      if (dut.u_main.op_new == OP_USHR || dut.u_main.op_new == OP_VSHR)
        hw_t1[dut.u_main.t_new]++;
    end
    if (dut.u_ph2.state == 2'd3 && dut.u_ph2.m == '0 && dut.u_ph2.after_fixb)
      hw_fixb_loc[dut.u_ph2.loc_new]++;
    if (dut.u_ph2.op == OP_DOUBLE && dut.u_ph2.m == '0) begin
      hw_t2[dut.u_ph2.t_new]++;
      if (dut.u_ph2.c_new) hw_c++;
    end
    if (dut.u_ph2.state == 2'd2 && dut.u_ph2.m == '0 && !fsel && dut.u_ph2.fs.sign)
      hw_ops[OP_FIXA]++;
  end

  function automatic big_t rand_big(input int bits);
    big_t x = '0;
    for (int i = 0; i < bits; i += 32) x[i +: 32] = $urandom;
    return x & ((big_t'(1) << bits) - 1);
  endfunction

  task automatic load(input bit sel, input big_t val, input int e);
    for (int i = 0; i <= e; i++) begin
      @(negedge clk);
      ld_we   = 1'b1;
      ld_sel  = sel;
      ld_idx  = IW'(i);
      ld_data = val[i*W +: W];
    end
    @(negedge clk);
    ld_we = 1'b0;
  endtask

  task automatic run_one(input bit f, input int n, input big_t p, input big_t a);
    int e, cycles, k, it1, it2;
    big_t b;
    e = (n + W - 1) / W;
    load(1'b0, p, e);
    load(1'b1, a, e);
    @(negedge clk);
    fsel   = f;
    n_bits = BSW'(n);
    start  = 1'b1;
    @(negedge clk);
    start  = 1'b0;
    cycles = 1;
    while (!done) begin
      @(negedge clk);
      cycles++;
    end
    b = '0;
    for (int i = 0; i <= e; i++) begin
      rd_idx = IW'(i);
      #1;
      b[i*W +: W] = rd_data;
    end
    model(p, a, n, f, k, it1, it2, stats);
    if (f) hw_gf2++;
    checks += 5;
    if (!check_inverse(p, a, b, n, f)) begin
      failures++;
      $display("FAIL result fsel=%0d n=%0d p=%h a=%h b=%h", f, n, p[63:0], a[63:0], b[63:0]);
    end
    if (k_out != BSW'(k)) begin
      failures++;
      $display("FAIL k fsel=%0d n=%0d hw=%0d model=%0d", f, n, k_out, k);
    end
    if (ph1_iters != BSW'(it1) || ph2_iters != BSW'(it2)) begin
      failures++;
      $display("FAIL passes fsel=%0d n=%0d hw=%0d/%0d model=%0d/%0d", f, n, ph1_iters, ph2_iters, it1, it2);
    end
    if (cycles != (e + 1) * (3 + it1 + it2) + 4) begin
      failures++;
      $display("FAIL cycles fsel=%0d n=%0d got=%0d expected=%0d", f, n, cycles, (e + 1) * (3 + it1 + it2) + 4);
    end
    if ((b >> ((e + 1) * W)) != 0 || (f == 0 && b[(e+1)*W-1] != 1'b0)) begin
      failures++;
      $display("FAIL top bits");
    end
  endtask

  initial begin
    big_t p, a;
    int n;
    bit f;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < NTESTS; t++) begin
      f = t[0];
      if (!f) begin
        // secp160r1 prime 2^160 - 2^31 - 1, then random odd 160-bit moduli.
        n = 160;
        p = (t < 6) ? (big_t'(1) << 160) - (big_t'(1) << 31) - 1
                    : rand_big(n) | (big_t'(1) << (n - 1)) | 1;
        do a = (t == 0) ? 1 : rand_big(n) % p; while (a == 0 || gcd(a, p) != 1);
      end else begin
        // x^131 + x^8 + x^3 + x^2 + 1, x^113 + x^9 + 1, and x^160 + random.
        case (t % 6)
          1:       begin n = 131; p = (big_t'(1) << 131) | 'h10D; end
          3:       begin n = 113; p = (big_t'(1) << 113) | 'h201; end
          default: begin n = 160; p = rand_big(n) | (big_t'(1) << n) | 1; end
        endcase
        do a = rand_big(n); while (a == 0 || pgcd(p, a) != 1);
      end
      run_one(f, n, p, a);
    end
    $display("full-size run: W=%0d, WORDS=%0d", W, WORDS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
