// tb_register_block: writes random words through the host port and the two
// write ports of every variable and reads them back through the shared read
// index and the host read port, against a model array.
module tb_register_block;
  import inv_pkg::*;
  localparam int W = 32, WORDS = 5, IW = $clog2(WORDS + 1);
  logic              clk = 1'b0;
  logic [IW-1:0]     rd_idx = '0, wr_idx = '0, top_idx = '0, ld_idx = '0, h_idx = '0;
  logic [W-1:0]      rd_u, rd_v, rd_r, rd_s, rd_p, ld_data = '0, h_data;
  logic [3:0]        we_lo = '0, we_top = '0;
  logic [3:0][W-1:0] wd_lo = '0, wd_top = '0;
  logic              ld_we = 1'b0, ld_sel = 1'b0;
  var_e              h_sel = VAR_U;
  logic [W-1:0]      model [5][WORDS+1];
  int checks = 0, failures = 0;

  register_block dut (.*);

  always #5 clk = ~clk;

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare;
    logic [W-1:0] got [5];
    for (int j = 0; j <= WORDS; j++) begin
      rd_idx = IW'(j);
      h_idx  = IW'(j);
      #1;
      got = '{rd_u, rd_v, rd_r, rd_s, rd_p};
      for (int i = 0; i < 5; i++) begin
        checks++;
        if (got[i] != model[i][j]) begin
          failures++;
          $display("FAIL var %0d word %0d got=%h exp=%h", i, j, got[i], model[i][j]);
        end
      end
      checks++;
      if (h_data != model[h_sel][j]) begin
        failures++;
        $display("FAIL host read var %0d word %0d", h_sel, j);
      end
    end
  endtask

  initial begin
    // Fill everything through the host port (p and v) and the write ports.
    for (int j = 0; j <= WORDS; j++) begin
      @(negedge clk);
      ld_we = 1'b1; ld_sel = 1'b0; ld_idx = IW'(j); ld_data = $urandom;
      model[4][j] = ld_data;
      we_lo = 4'b1101; wr_idx = IW'(j);
      for (int i = 0; i < 4; i++) begin
        wd_lo[i] = $urandom;
        if (i != 1) model[i][j] = wd_lo[i];
      end
      @(negedge clk);
      ld_sel = 1'b1; ld_data = $urandom; model[1][j] = ld_data;
      we_lo = '0;
    end
    @(negedge clk);
    ld_we = 1'b0;
    compare();
    for (int it = 0; it < 300; it++) begin
      @(negedge clk);
      we_lo  = $urandom;
      we_top = $urandom;
      wr_idx = IW'($urandom_range(0, WORDS - 1));
      top_idx = IW'(WORDS);
      for (int i = 0; i < 4; i++) begin
        wd_lo[i]  = $urandom;
        wd_top[i] = $urandom;
        if (we_lo[i])  model[i][wr_idx]  = wd_lo[i];
        if (we_top[i]) model[i][top_idx] = wd_top[i];
      end
      @(negedge clk);
      we_lo = '0; we_top = '0;
      h_sel = var_e'($urandom_range(0, 3));
      if (it % 10 == 0) compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
