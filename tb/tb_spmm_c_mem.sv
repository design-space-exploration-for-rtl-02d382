// Unit test of C_MEM: writes random words to every address, reads them back
// one cycle after rd_en, and checks read-before-write when a read and a
// write of the same address fall in one cycle.
module tb_spmm_c_mem;
  localparam int DEPTH = 64;
  localparam int W     = 16;
  localparam int AW    = $clog2(DEPTH);

  logic clk = 0;
  always #5 clk = ~clk;

  logic          rd_en, wr_en;
  logic [AW-1:0] rd_addr, wr_addr;
  logic [W-1:0]  rd_data, wr_data;

  spmm_c_mem #(.DEPTH(DEPTH), .W(W)) dut (.*);

  int checks = 0, failures = 0;
  logic [W-1:0] model [DEPTH];

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    rd_en = 0; wr_en = 0; rd_addr = '0; wr_addr = '0; wr_data = '0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = AW'(i); wr_data = W'($urandom); model[i] = wr_data;
    end
    @(negedge clk);
    wr_en = 0;
    for (int i = DEPTH - 1; i >= 0; i--) begin
      @(negedge clk);
      rd_en = 1; rd_addr = AW'(i);
      @(negedge clk);
      rd_en = 0;
      check($sformatf("read %0d", i), int'(rd_data), int'(model[i]));
    end
    // read and write the same address together: old data comes out
    for (int i = 0; i < 8; i++) begin
      int a;
      a = $urandom_range(DEPTH - 1);
      @(negedge clk);
      rd_en = 1; rd_addr = AW'(a); wr_en = 1; wr_addr = AW'(a); wr_data = W'($urandom);
      @(negedge clk);
      rd_en = 0; wr_en = 0;
      check("read-before-write", int'(rd_data), int'(model[a]));
      model[a] = wr_data;
      rd_en = 1;
      @(negedge clk);
      rd_en = 0;
      check("new data", int'(rd_data), int'(model[a]));
    end
    // rd_data holds while rd_en is low
    @(negedge clk);
    rd_en = 1; rd_addr = 0;
    @(negedge clk);
    rd_en = 0; rd_addr = 1;
    repeat (2) @(negedge clk);
    check("hold", int'(rd_data), int'(model[0]));
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
