// tb_workloads: the precisions over which the inverter is evaluated,
// 160, 192, 224 and 256-bit prime moduli with 32-bit words, on one instance
// built for eight words (scalability: the precision is a run-time input).
// For each size it draws random primes (Miller-Rabin) and random operands,
// checks every result, k, the pass counts and the clock count, and reports
// the mean k and the mean clocks per inversion. The mean k is checked to be
// close to 1.4 n (the expected Phase I iteration count of the algorithm) and
// the mean clock count to lie within 10% of the estimate
// (e+1)(3 + iterations) (1516, 2091, 2784 and 3575 clocks for the four
// sizes). It finishes with GF(2^n) inversions for the SEC binary-field
// polynomials of degree 163 and 233.
module tb_workloads;
  import inv_pkg::*;
  import inv_ref_pkg::*;

  localparam int W      = 32;
  localparam int WORDS  = 8;
  localparam int IW     = $clog2(WORDS + 1);
  localparam int NPRIME = 10;
  localparam int NINV   = 10;

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
  int last_cycles;

  mont_inverter #(.W(W), .WORDS(WORDS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
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

  task automatic run_one(input bit f, input int n, input big_t p, input big_t a, output int kk);
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
    checks += 3;
    if (!check_inverse(p, a, b, n, f)) begin
      failures++;
      $display("FAIL result fsel=%0d n=%0d", f, n);
    end
    if (k_out != BSW'(k) || ph1_iters != BSW'(it1) || ph2_iters != BSW'(it2)) begin
      failures++;
      $display("FAIL k/passes fsel=%0d n=%0d", f, n);
    end
    if (cycles != (e + 1) * (3 + it1 + it2) + 4) begin
      failures++;
      $display("FAIL cycles fsel=%0d n=%0d", f, n);
    end
    kk = k;
    last_cycles = cycles;
  endtask

  initial begin
    automatic int sizes[4] = '{160, 192, 224, 256};
    automatic int est[4]   = '{1516, 2091, 2784, 3575};
    big_t p, a;
    int   n, k, ksum, csum, cnt;
    real  kmean, cmean;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < 4; s++) begin
      n = sizes[s];
      ksum = 0;
      csum = 0;
      cnt  = 0;
      for (int q = 0; q < NPRIME; q++) begin
        do p = rand_big(n) | (big_t'(1) << (n - 1)) | 1; while (!is_prime(p));
        for (int i = 0; i < NINV; i++) begin
          do a = rand_big(n) % p; while (a == 0);
          run_one(1'b0, n, p, a, k);
          ksum += k;
          csum += last_cycles;
          cnt++;
        end
      end
      kmean = real'(ksum) / cnt;
      cmean = real'(csum) / cnt;
      $display("GF(p) n=%0d: mean k = %0.1f (k/n = %0.2f), mean clocks = %0.0f (estimate %0d)",
               n, kmean, kmean / n, cmean, est[s]);
      checks += 2;
      if (kmean / n < 1.25 || kmean / n > 1.6) begin
        failures++;
        $display("FAIL mean k/n out of range");
      end
      if (cmean < 0.9 * est[s] || cmean > 1.1 * est[s]) begin
        failures++;
        $display("FAIL mean clock count far from estimate");
      end
    end
    // GF(2^n): x^163 + x^7 + x^6 + x^3 + 1 and x^233 + x^74 + 1.
    for (int i = 0; i < 6; i++) begin
      if (i < 3) begin n = 163; p = (big_t'(1) << 163) | 'hC9; end
      else       begin n = 233; p = (big_t'(1) << 233) | (big_t'(1) << 74) | 1; end
      do a = rand_big(n); while (a == 0);
      run_one(1'b1, n, p, a, k);
      $display("GF(2^%0d): k = %0d (k/n = %0.2f), clocks = %0d", n, k, real'(k) / n, last_cycles);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
