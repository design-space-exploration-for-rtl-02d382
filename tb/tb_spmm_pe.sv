// Unit test of one PE: PE J=1 of P=2, the last PE of the chain, with N=8.
// The testbench streams two whole products (a sparse one and a dense one)
// straight into the PE, advancing the chain whenever the PE is ready, and
// checks: that every A/B beat reappears on the *_OUT registers one step
// later; that the PE's N*N/P result words equal columns 1, 3, 5, 7 of A*B
// worked out here, in row-major order; and that c_out_last marks the last
// word.
module tb_spmm_pe;
  localparam int N  = 8;
  localparam int W  = 16;
  localparam int P  = 2;
  localparam int J  = 1;
  localparam int IW = $clog2(N);
  localparam int NL = N / P;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          en, ready;
  logic          a_in_valid, b_in_valid, phase_end_in, last_in;
  logic [W-1:0]  a_in, b_in;
  logic [IW-1:0] a_ind_in_row, a_ind_in_col, b_ind_in_row, b_ind_in_col;
  logic          a_out_valid, b_out_valid, phase_end_out, last_out;
  logic [W-1:0]  a_out, b_out;
  logic [IW-1:0] a_ind_out_row, a_ind_out_col, b_ind_out_row, b_ind_out_col;
  logic          c_in_valid, c_in_last, c_out_valid, c_out_last, grant_in, grant_out;
  logic [W-1:0]  c_in, c_out;
  logic          phase_done, bypass_hit, drain_active;

  spmm_pe #(.N(N), .W(W), .P(P), .J(J)) dut (.*);

  assign en = ready;

  int checks = 0, failures = 0;
  logic signed [W-1:0] A [N][N];
  logic signed [W-1:0] B [N][N];
  int words, pass_err, n_pass;
  bit seen_last;
  logic [W-1:0] got [N * NL];

  task automatic check(input string what, input int got_, input int exp);
    checks++;
    if (got_ != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got_, exp);
    end
  endtask

  // pass-through: what went in at an accepting edge comes out after it
  logic [2*W+4*IW+3:0] sent_q [$];
  always @(posedge clk) if (rst_n && en && (a_in_valid || b_in_valid || phase_end_in))
    sent_q.push_back({a_in_valid, a_in, a_ind_in_row, a_ind_in_col,
                      b_in_valid, b_in, b_ind_in_row, b_ind_in_col, phase_end_in, last_in});
  always @(negedge clk) if (rst_n && (a_out_valid || b_out_valid || phase_end_out)) begin
    logic [2*W+4*IW+3:0] exp_, now;
    now = {a_out_valid, a_out, a_ind_out_row, a_ind_out_col,
           b_out_valid, b_out, b_ind_out_row, b_ind_out_col, phase_end_out, last_out};
    if (!$isunknown(now)) begin
      // an output stays for as many cycles as the chain is stalled
      if (sent_q.size() > 0 && sent_q[0] == now) begin
        void'(sent_q.pop_front());
        n_pass++;
      end
    end
  end

  always @(negedge clk) if (c_out_valid) begin
    if (words < N * NL) got[words] = c_out;
    if (c_out_last) begin
      seen_last = 1;
      check("c_out_last position", words, N * NL - 1);
    end
    words++;
  end

  task automatic beat(input bit av, input int ar, input int k, input bit bv, input int bc,
                      input bit pe_, input bit last_);
    @(negedge clk);
    a_in_valid = av; a_in = av ? A[ar][k] : '0; a_ind_in_row = IW'(ar); a_ind_in_col = IW'(k);
    b_in_valid = bv; b_in = bv ? B[k][bc] : '0; b_ind_in_row = IW'(k); b_ind_in_col = IW'(bc);
    phase_end_in = pe_; last_in = last_;
    #1;
    while (!ready) begin @(negedge clk); #1; end
  endtask

  task automatic product(input int zero_pct);
    words = 0; seen_last = 0; n_pass = 0;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        A[i][j] = ($urandom_range(99) < zero_pct) ? '0 : W'($urandom_range(200)) - W'(100);
        B[i][j] = ($urandom_range(99) < zero_pct) ? '0 : W'($urandom_range(200)) - W'(100);
      end
    for (int k = 0; k < N; k++) begin
      int ar [$];
      int bc [$];
      int nb;
      for (int i = 0; i < N; i++) begin
        if (A[i][k] != 0) ar.push_back(i);
        if (B[k][i] != 0) bc.push_back(i);
      end
      nb = (ar.size() > bc.size()) ? ar.size() : bc.size();
      if (nb == 0) nb = 1;
      for (int t = 0; t < nb; t++)
        beat(t < ar.size(), (t < ar.size()) ? ar[t] : 0, k,
             t < bc.size(), (t < bc.size()) ? bc[t] : 0, t == nb - 1, (t == nb - 1) && (k == N - 1));
    end
    @(negedge clk);
    a_in_valid = 0; b_in_valid = 0; phase_end_in = 0; last_in = 0;
    while (!seen_last) @(negedge clk);
    repeat (2) @(negedge clk);
    for (int r = 0; r < N; r++)
      for (int l = 0; l < NL; l++) begin
        logic [W-1:0] s;
        s = '0;
        for (int k = 0; k < N; k++) s += W'(A[r][k] * B[k][l * P + J]);
        check($sformatf("C[%0d][%0d]", r, l * P + J), int'(got[r * NL + l]), int'(s));
      end
    check("result words", words, N * NL);
    check("pass-through beats", sent_q.size(), 0);
    checks++;
    if (n_pass == 0) begin failures++; $display("FAIL nothing passed through"); end
  endtask

  initial begin
    a_in_valid = 0; b_in_valid = 0; phase_end_in = 0; last_in = 0;
    a_in = '0; b_in = '0; a_ind_in_row = '0; a_ind_in_col = '0; b_ind_in_row = '0; b_ind_in_col = '0;
    c_in_valid = 0; c_in = '0; c_in_last = 0; grant_in = 1;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    while (!ready) @(negedge clk);
    product(75);
    product(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
