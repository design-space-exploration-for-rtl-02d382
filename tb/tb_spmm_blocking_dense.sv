// Block-size sweep, dense case: a dense 384-by-384 product decomposed into
// b-by-b block products for the block sizes of the evaluation that divide
// 384 (b = 96, 128, 192, 384; b = 384 is the unblocked product), on arrays
// of 32 PEs working side by side on the same matrices. Every word of C is
// checked, and each run is checked against the cycle budget of the dense
// schedule: (384/b)^2 output blocks, each taking 384 phases of b*b/32
// cycles plus b*b read-out cycles.
module tb_spmm_blocking_dense;
  localparam int M = 384;
  localparam int W = 16;
  localparam int P = 32;
  localparam int NCFG = 4;
  localparam int BS [NCFG] = '{96, 128, 192, 384};
  localparam int ZS [1] = '{0};

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
    join
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    $display("zeros%%  cycles for b = 96, 128, 192, 384");
    foreach (ZS[z]) begin
      run_all(ZS[z]);
      $display("%3d     %0d %0d %0d %0d", ZS[z], cycles[0], cycles[1], cycles[2], cycles[3]);
      for (int c = 0; c < NCFG; c++) begin
        checks++;
        if (errs[c] != 0) begin
          failures++;
          $display("FAIL b=%0d zeros=%0d: %0d wrong words", BS[c], ZS[z], errs[c]);
        end
        begin
          longint nb, lo, hi;
          nb = (M / BS[c]) * (M / BS[c]);
          lo = nb * (longint'(M) * BS[c] * BS[c] / P + BS[c] * BS[c]);
          hi = lo + nb * (BS[c] + P + 16);
          checks++;
          if (cycles[c] < lo || cycles[c] > hi) begin
            failures++;
            $display("FAIL b=%0d dense: %0d cycles outside [%0d, %0d]", BS[c], cycles[c], lo, hi);
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
