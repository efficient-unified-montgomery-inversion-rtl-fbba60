// tb_flag_tracker: streams random multi-word values (with runs of zero words,
// negative values and all-zero values) in the slice output order (word m-1 in
// cycle m, word e in the last cycle) and checks the committed bit length,
// sign and low three bits, and that flags hold when we = 0.
module tb_flag_tracker;
  import inv_pkg::*;
  localparam int W = 8, WORDS = 4, MW = $clog2(WORDS + 2);
  logic          clk = 1'b0, rst_n = 1'b0;
  logic [MW-1:0] m = '0, e = '0;
  logic          first = 1'b0, last = 1'b0, we = 1'b0;
  logic [W-1:0]  z_lo = '0, z_top = '0;
  flags_t        flags;
  int checks = 0, failures = 0;

  flag_tracker #(.W(W), .WORDS(WORDS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [(WORDS+1)*W-1:0] x;
    int   ne, bl;
    flags_t prev;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int it = 0; it < 2000; it++) begin
      ne = $urandom_range(1, WORDS);
      x = '0;
      for (int j = 0; j <= ne; j++)
        if ($urandom_range(0, 3) != 0) x[j*W +: W] = W'($urandom);
      if (it % 5 == 0) x = '0;
      we = (it % 7 != 3);
      prev = flags;
      e = MW'(ne);
      for (int mm = 0; mm <= ne; mm++) begin
        @(negedge clk);
        m = MW'(mm);
        first = (mm == 0);
        last  = (mm == ne);
        z_lo  = (mm == 0) ? W'($urandom) : x[(mm-1)*W +: W];
        z_top = (mm == ne) ? x[ne*W +: W] : W'($urandom);
      end
      @(negedge clk);
      first = 1'b0; last = 1'b0;
      bl = 0;
      for (int i = 0; i < (ne + 1) * W; i++) if (x[i]) bl = i + 1;
      checks++;
      if (!we) begin
        if (flags != prev) begin
          failures++;
          $display("FAIL flags changed with we=0");
        end
      end else if (flags.bitsize != BSW'(bl) || flags.sign != x[(ne+1)*W-1] || flags.low != x[2:0]) begin
        failures++;
        $display("FAIL e=%0d x=%h got bs=%0d sign=%0d low=%0d exp bs=%0d", ne, x, flags.bitsize, flags.sign, flags.low, bl);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
