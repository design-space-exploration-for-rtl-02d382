// PE-count sweep: the 256-by-256 products of the evaluation, with 0% (dense),
// 70%, 80% and 90% zeros, on arrays of 4, 8, 16, 32 and 64 PEs. The five
// arrays run side by side on the same matrices. Every result is checked
// against C = A*B; the dense runs are also checked against the cycle budget
// N + N^3/P + P (computing) + N*N (read-out). The cycle counts are printed
// as a table, one row per zero percentage.
module tb_spmm_pe_sweep;
  localparam int N = 256;
  localparam int W = 16;
  localparam int NCFG = 5;
  localparam int PS [NCFG] = '{4, 8, 16, 32, 64};
  localparam int ZS [4] = '{0, 70, 80, 90};

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycles [NCFG];
  int     errs [NCFG];

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    tb_spmm_harness #(.N(N), .W(W), .P(PS[g])) h (.clk, .rst_n);
  end

  task automatic run_all(input int z);
    fork
      begin g_cfg[0].h.gen(z, 32'd7); g_cfg[0].h.run(cycles[0], errs[0]); end
      begin g_cfg[1].h.gen(z, 32'd7); g_cfg[1].h.run(cycles[1], errs[1]); end
      begin g_cfg[2].h.gen(z, 32'd7); g_cfg[2].h.run(cycles[2], errs[2]); end
      begin g_cfg[3].h.gen(z, 32'd7); g_cfg[3].h.run(cycles[3], errs[3]); end
      begin g_cfg[4].h.gen(z, 32'd7); g_cfg[4].h.run(cycles[4], errs[4]); end
    join
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    $display("zeros%%  cycles for P = 4, 8, 16, 32, 64");
    foreach (ZS[z]) begin
      run_all(ZS[z]);
      $display("%3d     %0d %0d %0d %0d %0d", ZS[z], cycles[0], cycles[1], cycles[2], cycles[3], cycles[4]);
      for (int c = 0; c < NCFG; c++) begin
        checks++;
        if (errs[c] != 0) begin
          failures++;
          $display("FAIL P=%0d zeros=%0d: %0d wrong words", PS[c], ZS[z], errs[c]);
        end
        if (ZS[z] == 0) begin
          longint lo, hi;
          lo = longint'(N) * N * N / PS[c] + N * N;
          hi = lo + N + PS[c] + 16;
          checks++;
          if (cycles[c] < lo || cycles[c] > hi) begin
            failures++;
            $display("FAIL P=%0d dense: %0d cycles outside [%0d, %0d]", PS[c], cycles[c], lo, hi);
          end
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
