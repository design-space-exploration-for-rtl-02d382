// Test harness around one spmm_top instance, used by the workload tests.
//
// It holds an M-by-M product (M a multiple of the array size N), generates A
// and B with a given percentage of zeros from a seeded generator (so that
// several harnesses with the same seed work on the same matrices), and
// multiplies them block by block: for every N-by-N output block (I, J) it
// streams all M phases k, sending the non-zero A[I-block rows][k] and
// B[k][J-block columns] with block-local indices, and collects the N*N
// result words (a block with the wrong number of words counts as one
// error). With M = N this is a plain, unblocked product. Results are
// compared with C = A*B worked out here. run() returns the cycles from the
// first beat to the last result word and the number of wrong words.
module tb_spmm_harness #(
  parameter int N = 16,
  parameter int W = 16,
  parameter int P = 4,
  parameter int M = N
) (
  input logic clk,
  input logic rst_n
);
  localparam int IW = $clog2(N);
  localparam int NL = N / P;

  logic          in_a_valid, in_b_valid, in_phase_end, in_last, in_ready;
  logic [W-1:0]  in_a, in_b;
  logic [IW-1:0] in_a_row, in_a_col, in_b_row, in_b_col;
  logic          c_valid, c_last, stall;
  logic [W-1:0]  c_data;
  logic [P-1:0]  phase_done, bypass_hit, drain_active;

  spmm_top #(.N(N), .W(W), .P(P)) dut (.*);

  logic signed [W-1:0] A [M][M];
  logic signed [W-1:0] B [M][M];
  logic        [W-1:0] Cref [M][M];
  logic        [W-1:0] Cgot [M][M];
  int     words;
  bit     seen_last;
  int     bi, bj;                // output block being collected
  longint cyc = 0;
  longint n_stall = 0, n_phase = 0, n_bypass = 0, n_macs = 0;
  int unsigned lcg;

  always @(posedge clk) cyc <= cyc + 1;

  always @(negedge clk) if (rst_n) begin
    if (stall && (in_a_valid || in_b_valid || in_phase_end)) n_stall++;
    n_phase  += $countones(phase_done);
    n_bypass += $countones(bypass_hit);
  end

  always @(negedge clk) if (c_valid) begin
    int pe, loc, r, c;
    pe  = words / (N * NL);
    loc = words % (N * NL);
    r   = loc / NL;
    c   = (loc % NL) * P + pe;
    if (words < N * N) Cgot[bi * N + r][bj * N + c] = c_data;
    if (c_last) seen_last = 1'b1;
    words++;
  end

  function automatic int unsigned rnd(input int unsigned range);
    lcg = lcg * 32'd1103515245 + 32'd12345;
    return (lcg >> 8) % range;
  endfunction

  function automatic logic [W-1:0] nz();
    logic [W-1:0] v;
    v = W'(rnd(127) + 1);
    return rnd(2) != 0 ? v : -v;
  endfunction

  task automatic gen(input int zero_pct, input int unsigned seed);
    lcg = seed;
    for (int i = 0; i < M; i++)
      for (int j = 0; j < M; j++) begin
        A[i][j] = (rnd(100) < zero_pct) ? '0 : nz();
        B[i][j] = (rnd(100) < zero_pct) ? '0 : nz();
      end
    for (int i = 0; i < M; i++)
      for (int j = 0; j < M; j++) Cref[i][j] = '0;
    for (int i = 0; i < M; i++)
      for (int k = 0; k < M; k++)
        if (A[i][k] != 0)
          for (int j = 0; j < M; j++)
            if (B[k][j] != 0) Cref[i][j] += W'(A[i][k] * B[k][j]);
  endtask

  task automatic beat(input bit av, input int ar, input int k, input bit bv, input int bc,
                      input bit pe_, input bit last_);
    @(negedge clk);
    in_a_valid   = av;
    in_a         = av ? A[bi * N + ar][k] : '0;
    in_a_row     = IW'(ar);
    in_a_col     = IW'(k % N);
    in_b_valid   = bv;
    in_b         = bv ? B[k][bj * N + bc] : '0;
    in_b_row     = IW'(k % N);
    in_b_col     = IW'(bc);
    in_phase_end = pe_;
    in_last      = last_;
    #1;
    while (!in_ready) begin
      @(negedge clk);
      #1;
    end
  endtask

  task automatic run(output longint cycles, output int errs);
    longint t0;
    int     short_blocks;
    short_blocks = 0;
    in_a_valid = 0; in_b_valid = 0; in_phase_end = 0; in_last = 0;
    while (!in_ready) @(negedge clk);
    t0 = cyc;
    for (int ib = 0; ib < M / N; ib++)
      for (int jb = 0; jb < M / N; jb++) begin
        // results of the previous block must be out before bi/bj move on
        bi = ib;
        bj = jb;
        words = 0;
        seen_last = 0;
        for (int k = 0; k < M; k++) begin
          int ar [$];
          int bc [$];
          int nb;
          for (int i = 0; i < N; i++) begin
            if (A[ib * N + i][k] != 0) ar.push_back(i);
            if (B[k][jb * N + i] != 0) bc.push_back(i);
          end
          n_macs += ar.size() * bc.size();
          nb = (ar.size() > bc.size()) ? ar.size() : bc.size();
          if (nb == 0) nb = 1;
          for (int t = 0; t < nb; t++)
            beat(t < ar.size(), (t < ar.size()) ? ar[t] : 0, k,
                 t < bc.size(), (t < bc.size()) ? bc[t] : 0,
                 t == nb - 1, (t == nb - 1) && (k == M - 1));
        end
        @(negedge clk);
        in_a_valid = 0; in_b_valid = 0; in_phase_end = 0; in_last = 0;
        while (!seen_last) @(negedge clk);
        if (words != N * N) short_blocks++;
      end
    cycles = cyc - t0;
    errs = short_blocks;
    for (int i = 0; i < M; i++)
      for (int j = 0; j < M; j++)
        if (Cgot[i][j] !== Cref[i][j]) errs++;
  endtask

  initial begin
    in_a_valid = 0; in_b_valid = 0; in_phase_end = 0; in_last = 0;
    in_a = '0; in_b = '0; in_a_row = '0; in_a_col = '0; in_b_row = '0; in_b_col = '0;
    bi = 0; bj = 0; words = 0; seen_last = 0;
  end
endmodule
