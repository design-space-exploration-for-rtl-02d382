// Unit test of A_MEM: fills both banks with columns of different lengths
// (including a close that comes with the last write and an empty column),
// then checks the element counts and reads every stored (value, row) back
// through the registered read port, while the other bank is being written.
module tb_spmm_a_mem;
  localparam int N  = 8;
  localparam int W  = 16;
  localparam int IW = $clog2(N);
  localparam int CW = $clog2(N + 1);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          wr_en, wr_bank, bank_close, rd_en, rd_bank;
  logic [W-1:0]  wr_val, rd_val;
  logic [IW-1:0] wr_row, rd_addr, rd_row;
  logic [CW-1:0] cnt [2];

  spmm_a_mem #(.N(N), .W(W)) dut (.*);

  int checks = 0, failures = 0;
  logic [W-1:0]  ev [2][N];
  logic [IW-1:0] er [2][N];

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // write n elements into bank b; close with the last write (or alone if n == 0)
  task automatic fill(input bit b, input int n, input bit close_alone);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      wr_en = 1; wr_bank = b;
      wr_val = W'($urandom); wr_row = IW'($urandom);
      ev[b][i] = wr_val; er[b][i] = wr_row;
      bank_close = !close_alone && (i == n - 1);
    end
    if (close_alone || n == 0) begin
      @(negedge clk);
      wr_en = 0; wr_bank = b; bank_close = 1;
    end
    @(negedge clk);
    wr_en = 0; bank_close = 0;
  endtask

  task automatic readback(input bit b, input int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      rd_en = 1; rd_bank = b; rd_addr = IW'(i);
      @(negedge clk);
      rd_en = 0;
      check($sformatf("bank %0d val %0d", b, i), int'(rd_val), int'(ev[b][i]));
      check($sformatf("bank %0d row %0d", b, i), int'(rd_row), int'(er[b][i]));
    end
  endtask

  initial begin
    wr_en = 0; wr_bank = 0; bank_close = 0; rd_en = 0; rd_bank = 0; rd_addr = '0;
    wr_val = '0; wr_row = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    fill(0, 5, 1);
    check("cnt0", int'(cnt[0]), 5);
    fill(1, N, 0);
    check("cnt1 full column", int'(cnt[1]), N);
    check("cnt0 kept", int'(cnt[0]), 5);
    readback(0, 5);
    readback(1, N);
    // refill bank 0 with 3 elements; bank 1 must be unchanged
    fill(0, 3, 0);
    check("cnt0 refill", int'(cnt[0]), 3);
    readback(0, 3);
    readback(1, N);
    // an empty column
    fill(1, 0, 1);
    check("cnt1 empty", int'(cnt[1]), 0);
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
