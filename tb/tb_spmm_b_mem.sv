// Unit test of B_MEM for PE J=1 of P=4 with N=16: offers whole rows of B
// (every column once, in random order) and checks that only the columns
// c with c mod 4 == 1 are kept, with local column c div 4, in arrival order,
// and that the counts per bank are right.
module tb_spmm_b_mem;
  localparam int N  = 16;
  localparam int W  = 16;
  localparam int P  = 4;
  localparam int J  = 1;
  localparam int IW = $clog2(N);
  localparam int NL = N / P;
  localparam int LW = $clog2(NL);
  localparam int CW = $clog2(NL + 1);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          wr_en, wr_bank, bank_close, rd_en, rd_bank;
  logic [W-1:0]  wr_val, rd_val;
  logic [IW-1:0] wr_col;
  logic [LW-1:0] rd_addr, rd_lcol;
  logic [CW-1:0] cnt [2];

  spmm_b_mem #(.N(N), .W(W), .P(P), .J(J)) dut (.*);

  int checks = 0, failures = 0;
  logic [W-1:0]  ev [2][NL];
  logic [LW-1:0] el [2][NL];
  int            en_ [2];

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // offer a row holding the columns in cols[]
  task automatic row(input bit b, input int cols [$]);
    en_[b] = 0;
    for (int i = 0; i < cols.size(); i++) begin
      @(negedge clk);
      wr_en = 1; wr_bank = b; wr_col = IW'(cols[i]); wr_val = W'($urandom);
      bank_close = (i == cols.size() - 1);
      if (cols[i] % P == J) begin
        ev[b][en_[b]] = wr_val;
        el[b][en_[b]] = LW'(cols[i] / P);
        en_[b]++;
      end
    end
    @(negedge clk);
    wr_en = 0; bank_close = 0;
  endtask

  task automatic readback(input bit b);
    for (int i = 0; i < en_[b]; i++) begin
      @(negedge clk);
      rd_en = 1; rd_bank = b; rd_addr = LW'(i);
      @(negedge clk);
      rd_en = 0;
      check($sformatf("bank %0d val %0d", b, i), int'(rd_val), int'(ev[b][i]));
      check($sformatf("bank %0d lcol %0d", b, i), int'(rd_lcol), int'(el[b][i]));
    end
  endtask

  initial begin
    int cols [$];
    wr_en = 0; wr_bank = 0; bank_close = 0; rd_en = 0; rd_bank = 0; rd_addr = '0;
    wr_val = '0; wr_col = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int c = 0; c < N; c++) cols.push_back(c);
    cols.shuffle();
    row(0, cols);
    check("cnt0 dense row", int'(cnt[0]), NL);
    cols = '{0, 5, 2, 13, 7, 8};
    row(1, cols);
    check("cnt1 sparse row", int'(cnt[1]), 2);
    readback(0);
    readback(1);
    cols = '{3, 4, 6};
    row(0, cols);
    check("cnt0 nothing owned", int'(cnt[0]), 0);
    check("cnt1 kept", int'(cnt[1]), 2);
    readback(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
