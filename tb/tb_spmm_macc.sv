// Unit test of the MACC. The testbench plays the C_MEM (a block RAM with a
// registered read and read-before-write) and sends random operations,
// including runs that hit the same address in consecutive cycles (the
// bypass case) and signed operands. After each run the memory must equal
// the sums worked out here, and the number of bypass cycles must match.
// A second instance with FRAC=8 checks the fixed-point scaling.
module tb_spmm_macc;
  localparam int W  = 16;
  localparam int AW = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // ---- integer instance ----
  logic          in_valid, c_rd_en, c_wr_en, busy, bypass_hit;
  logic [W-1:0]  a, b, c_rd_data, c_wr_data;
  logic [AW-1:0] addr, c_rd_addr, c_wr_addr;
  logic [W-1:0]  cmem [1 << AW];

  spmm_macc #(.W(W), .FRAC(0), .AW(AW)) dut (.*);

  always @(posedge clk) begin
    if (c_rd_en) c_rd_data <= cmem[c_rd_addr];
    if (c_wr_en) cmem[c_wr_addr] <= c_wr_data;
  end

  // ---- fixed-point instance (8 fraction bits) ----
  logic          f_valid, f_rd_en, f_wr_en, f_busy, f_byp;
  logic [W-1:0]  fa, fb, f_rd_data, f_wr_data;
  logic [AW-1:0] faddr, f_rd_addr, f_wr_addr;
  logic [W-1:0]  fmem [1 << AW];

  spmm_macc #(.W(W), .FRAC(8), .AW(AW)) dut_q8 (
    .clk, .rst_n, .in_valid(f_valid), .a(fa), .b(fb), .addr(faddr),
    .c_rd_en(f_rd_en), .c_rd_addr(f_rd_addr), .c_rd_data(f_rd_data),
    .c_wr_en(f_wr_en), .c_wr_addr(f_wr_addr), .c_wr_data(f_wr_data),
    .busy(f_busy), .bypass_hit(f_byp)
  );

  always @(posedge clk) begin
    if (f_rd_en) f_rd_data <= fmem[f_rd_addr];
    if (f_wr_en) fmem[f_wr_addr] <= f_wr_data;
  end

  int n_byp = 0;
  always @(negedge clk) if (bypass_hit) n_byp++;

  logic [W-1:0] ref_mem [1 << AW];

  task automatic run(input int len, input int same_pct);
    int exp_byp, prev;
    exp_byp = 0;
    prev = -1;
    n_byp = 0;
    for (int i = 0; i < len; i++) begin
      int ad;
      logic signed [W-1:0] x, y;
      ad = ($urandom_range(99) < same_pct && prev >= 0) ? prev : $urandom_range((1 << AW) - 1);
      x = W'($urandom_range(400)) - W'(200);
      y = W'($urandom_range(400)) - W'(200);
      @(negedge clk);
      in_valid = 1; a = x; b = y; addr = AW'(ad);
      if (ad == prev) exp_byp++;
      ref_mem[ad] = ref_mem[ad] + W'(x * y);
      prev = ad;
    end
    @(negedge clk);
    in_valid = 0;
    repeat (3) @(negedge clk);
    check("not busy when idle", int'(busy), 0);
    for (int i = 0; i < (1 << AW); i++)
      check($sformatf("C[%0d]", i), int'(cmem[i]), int'(ref_mem[i]));
    check("bypass count", n_byp, exp_byp);
  endtask

  initial begin
    in_valid = 0; a = '0; b = '0; addr = '0;
    f_valid = 0; fa = '0; fb = '0; faddr = '0;
    c_rd_data = '0; f_rd_data = '0;
    for (int i = 0; i < (1 << AW); i++) begin cmem[i] = '0; fmem[i] = '0; ref_mem[i] = '0; end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    run(40, 0);
    run(60, 50);
    run(20, 100);
    // fixed point: 1.5 * -2.25 = -3.375, then + 0.5*0.5 = -3.125 (Q8.8)
    @(negedge clk);
    f_valid = 1; fa = 16'h0180; fb = 16'hFDC0; faddr = 3;
    @(negedge clk);
    fa = 16'h0080; fb = 16'h0080; faddr = 3;
    @(negedge clk);
    f_valid = 0;
    repeat (3) @(negedge clk);
    check("Q8.8 result", int'(fmem[3]), int'(16'hFCE0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
