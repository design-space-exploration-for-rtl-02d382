// Unit test of the PE control logic (N=8, P=2, not the last PE). The
// testbench stands in for the memories by setting the element counts of each
// bank, and checks: the C_MEM clear sweep after reset; the order and number
// of (A, B) pairs issued per phase and the one-cycle-later mac_valid; that a
// third phase is held back (ready low) until the first one is computed; a
// phase with no A elements; and the read-out (wait for grant, N*N/P reads
// with clearing writes, own_valid a cycle later, then forwarding with
// grant_out until a word flagged last comes from downstream).
module tb_spmm_pe_ctrl;
  localparam int N     = 8;
  localparam int P     = 2;
  localparam int IW    = $clog2(N);
  localparam int NL    = N / P;
  localparam int LW    = $clog2(NL);
  localparam int ACW   = $clog2(N + 1);
  localparam int BCW   = $clog2(NL + 1);
  localparam int DEPTH = N * NL;
  localparam int CAW   = $clog2(DEPTH);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic           en, in_a_valid, in_b_valid, in_phase_end, in_last, ready;
  logic           a_wr_en, b_wr_en, wr_bank, bank_close;
  logic [ACW-1:0] a_cnt [2];
  logic [BCW-1:0] b_cnt [2];
  logic           a_rd_en, b_rd_en, rd_bank, mac_valid, macc_busy;
  logic [IW-1:0]  a_rd_addr;
  logic [LW-1:0]  b_rd_addr;
  logic           c_rd_en, c_wr_en;
  logic [CAW-1:0] c_rd_addr, c_wr_addr;
  logic           grant_in, grant_out, own_valid, own_last, fwd, c_in_valid, c_in_last;
  logic           phase_done, drain_active;

  spmm_pe_ctrl #(.N(N), .P(P), .LAST_PE(1'b0)) dut (.*);

  int checks = 0, failures = 0;

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // MACC stand-in: busy the cycle after mac_valid
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) macc_busy <= 1'b0; else macc_busy <= mac_valid;

  // logs
  int issues [$];        // {bank, ia, ib} packed as bank*256 + ia*16 + ib
  int n_mac = 0, n_done = 0, n_clr = 0, n_rd = 0, n_own = 0, rd_order_err = 0;
  int n_grant = 0;
  always @(negedge clk) if (rst_n) begin
    if (a_rd_en) issues.push_back(int'(rd_bank) * 256 + int'(a_rd_addr) * 16 + int'(b_rd_addr));
    if (mac_valid) n_mac++;
    if (phase_done) n_done++;
    if (c_rd_en) begin
      if (int'(c_rd_addr) != n_rd || !c_wr_en || c_wr_addr != c_rd_addr) rd_order_err++;
      n_rd++;
    end else if (c_wr_en) begin
      if (int'(c_wr_addr) != n_clr) rd_order_err++;
      n_clr++;
    end
    if (own_valid) n_own++;
    if (grant_out) n_grant++;
  end

  // present one beat; returns the number of cycles it waited for ready
  task automatic beat(input bit av, input bit pe_, input bit last_, output int waited);
    @(negedge clk);
    in_a_valid = av; in_b_valid = 1'b1; in_phase_end = pe_; in_last = last_;
    waited = 0;
    #1;
    while (!ready) begin
      @(negedge clk);
      #1;
      waited++;
    end
    @(negedge clk);
    in_a_valid = 0; in_b_valid = 0; in_phase_end = 0; in_last = 0;
  endtask

  // take the pairs issued from one bank off the log and check their order
  task automatic expect_pairs(input int bank, input int na, input int nb);
    int got [$];
    while (issues.size() > 0 && issues[0] / 256 == bank) got.push_back(issues.pop_front());
    checks++;
    if (got.size() != na * nb) begin
      failures++;
      $display("FAIL bank %0d: %0d pairs issued, expected %0d", bank, got.size(), na * nb);
    end else
      for (int i = 0; i < na; i++)
        for (int j = 0; j < nb; j++)
          check("pair order", got[i * nb + j], bank * 256 + i * 16 + j);
  endtask

  initial begin
    int w;
    en = 1; in_a_valid = 0; in_b_valid = 0; in_phase_end = 0; in_last = 0;
    a_cnt[0] = '0; a_cnt[1] = '0; b_cnt[0] = '0; b_cnt[1] = '0;
    grant_in = 0; c_in_valid = 0; c_in_last = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // clear sweep
    while (!ready) @(negedge clk);
    check("clear sweep length", n_clr, DEPTH);

    // phase 0 into bank 0 (3 x 2), phase 1 into bank 1 (2 x 3), phase 2 must wait
    a_cnt[0] = 3; b_cnt[0] = 2;
    beat(1, 1, 0, w);
    check("phase 0 accepted at once", w, 0);
    a_cnt[1] = 2; b_cnt[1] = 3;
    beat(1, 1, 0, w);
    check("phase 1 accepted at once", w, 0);
    beat(1, 0, 0, w);
    checks++;
    if (w == 0) begin
      failures++;
      $display("FAIL third phase was not held back");
    end
    expect_pairs(0, 3, 2);
    // finish phase 2 in bank 0 with no A element
    a_cnt[0] = 0; b_cnt[0] = 4;
    @(negedge clk);
    in_b_valid = 1; in_phase_end = 1;
    #1;
    while (!ready) begin @(negedge clk); #1; end
    @(negedge clk);
    in_b_valid = 0; in_phase_end = 0;
    repeat (12) @(negedge clk);
    expect_pairs(1, 2, 3);
    check("phases done", n_done, 3);
    check("mac_valid count", n_mac, 12);

    // final phase into bank 1 (1 x 1)
    a_cnt[1] = 1; b_cnt[1] = 1;
    beat(1, 1, 1, w);
    repeat (10) @(negedge clk);
    expect_pairs(1, 1, 1);
    check("read-out waits for grant", n_rd, 0);
    check("drain active while waiting", int'(drain_active), 1);
    grant_in = 1;
    repeat (DEPTH + 4) @(negedge clk);
    check("read-out words", n_rd, DEPTH);
    check("own_valid words", n_own, DEPTH);
    check("read/clear order", rd_order_err, 0);
    check("forwarding", int'(fwd), 1);
    checks++;
    if (n_grant == 0) begin
      failures++;
      $display("FAIL grant_out never raised");
    end
    c_in_valid = 1;
    @(negedge clk);
    c_in_last = 1;
    @(negedge clk);
    c_in_valid = 0; c_in_last = 0;
    @(negedge clk);
    check("back to computing", int'(drain_active), 0);
    check("grant dropped", int'(grant_out), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
