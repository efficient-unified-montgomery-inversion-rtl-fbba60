// tb_bidir_shifter: streams random 4-word values through the shifter, least
// significant word first, and compares each output word with the same value
// shifted as a whole (left: word m in cycle m; right: word m-1 in cycle m,
// and the sign-filled top word in the last cycle).
module tb_bidir_shifter;
  localparam int W  = 8;
  localparam int NW = 4;
  logic         clk = 1'b0;
  logic         first, dir_right;
  logic [1:0]   amt;
  logic [W-1:0] din, dout, dtop;
  int checks = 0, failures = 0;

  bidir_shifter #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NW*W-1:0]        x, y;
    logic signed [NW*W-1:0] xs;
    first = 1'b0; dir_right = 1'b0; amt = '0; din = '0;
    for (int it = 0; it < 500; it++) begin
      x = {$urandom, $urandom};
      dir_right = $urandom;
      amt = $urandom;
      xs = $signed(x);
      if (dir_right) y = xs >>> amt;
      else y = x << amt;
      for (int m = 0; m < NW; m++) begin
        @(negedge clk);
        first = (m == 0);
        din   = x[m*W +: W];
        #1;
        if (!dir_right) begin
          checks++;
          if (dout != y[m*W +: W]) begin
            failures++;
            $display("FAIL left m=%0d amt=%0d got=%h exp=%h", m, amt, dout, y[m*W +: W]);
          end
        end else begin
          if (m > 0) begin
            checks++;
            if (dout != y[(m-1)*W +: W]) begin
              failures++;
              $display("FAIL right m=%0d amt=%0d got=%h exp=%h", m, amt, dout, y[(m-1)*W +: W]);
            end
          end
          if (m == NW - 1) begin
            checks++;
            if (dtop != y[m*W +: W]) begin
              failures++;
              $display("FAIL top amt=%0d got=%h exp=%h", amt, dtop, y[m*W +: W]);
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
