// Block-size sweep: a 768-by-768 product decomposed into b-by-b block
// products for the block sizes of the evaluation, b = 96, 128, 192, 256 and
// 384, on arrays of 32 PEs (32 divides every b). For each output block the
// host streams all 768 phases restricted to that block's rows of A and
// columns of B, so each N-by-N block of C is accumulated inside the array
// and read out once: (768/b)^2 read-outs covering (768/b)^3 b-by-b
// products. Matrices with 90% and 70% zeros are run; all five arrays work
// side by side on the same matrices and every word of C is checked. The
// cycle counts are printed, one row per zero percentage.
module tb_spmm_blocking;
  localparam int M = 768;
  localparam int W = 16;
  localparam int P = 32;
  localparam int NCFG = 5;
  localparam int BS [NCFG] = '{96, 128, 192, 256, 384};
  localparam int ZS [2] = '{90, 70};

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycles [NCFG];
  int     errs [NCFG];

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    tb_spmm_harness #(.N(BS[g]), .W(W), .P(P), .M(M)) h (.clk, .rst_n);
  end

  task automatic run_all(input int z);
    fork
      begin g_cfg[0].h.gen(z, 32'd11); g_cfg[0].h.run(cycles[0], errs[0]); end
      begin g_cfg[1].h.gen(z, 32'd11); g_cfg[1].h.run(cycles[1], errs[1]); end
      begin g_cfg[2].h.gen(z, 32'd11); g_cfg[2].h.run(cycles[2], errs[2]); end
      begin g_cfg[3].h.gen(z, 32'd11); g_cfg[3].h.run(cycles[3], errs[3]); end
      begin g_cfg[4].h.gen(z, 32'd11); g_cfg[4].h.run(cycles[4], errs[4]); end
    join
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    $display("zeros%%  cycles for b = 96, 128, 192, 256, 384");
    foreach (ZS[z]) begin
      run_all(ZS[z]);
      $display("%3d     %0d %0d %0d %0d %0d", ZS[z], cycles[0], cycles[1], cycles[2], cycles[3], cycles[4]);
      for (int c = 0; c < NCFG; c++) begin
        checks++;
        if (errs[c] != 0) begin
          failures++;
          $display("FAIL b=%0d zeros=%0d: %0d wrong words", BS[c], ZS[z], errs[c]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
