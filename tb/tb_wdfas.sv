// tb_wdfas: random test of the word dual-field adder/subtracter against
// integer addition (GF(p) mode) and XOR (GF(2^n) mode).
module tb_wdfas;
  localparam int W = 32;
  logic [W-1:0] a, b, z;
  logic         sub, fsel, cin, cout;
  int checks = 0, failures = 0;

  wdfas dut (.*);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W:0] exp_sum;
    for (int i = 0; i < 4000; i++) begin
      a    = (i % 7 == 0) ? '1 : $urandom;
      b    = (i % 11 == 0) ? '1 : $urandom;
      sub  = $urandom;
      fsel = $urandom;
      cin  = $urandom;
      #1;
      if (fsel) exp_sum = {1'b0, a ^ b};
      else if (sub) exp_sum = {1'b0, a} + {1'b0, ~b} + (W+1)'(cin);
      else exp_sum = {1'b0, a} + {1'b0, b} + (W+1)'(cin);
      checks++;
      if ({cout, z} != exp_sum) begin
        failures++;
        if (failures < 10) $display("FAIL a=%h b=%h sub=%0d fsel=%0d cin=%0d got=%h exp=%h", a, b, sub, fsel, cin, {cout, z}, exp_sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
