// Full-size test of the sparse matrix-matrix multiplier: the top at its
// default parameters (N=256, W=16, P=64). One 90%-sparse 256-by-256 product
// and one dense one are streamed through the array and checked word by word
// against C = A*B worked out here; the dense product is also checked against
// the cycle budget N + N^3/P + P for computing plus N*N for the read-out.
// Input stalls, phases computed, read-out and overlap of loading with
// computing are counted and must each have happened.
module tb_spmm_full;
  localparam int N  = spmm_pkg::N_DEFAULT;
  localparam int W  = spmm_pkg::W_DEFAULT;
  localparam int P  = spmm_pkg::P_DEFAULT;
  localparam int IW = $clog2(N);
  localparam int NL = N / P;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          in_a_valid, in_b_valid, in_phase_end, in_last, in_ready;
  logic [W-1:0]  in_a, in_b;
  logic [IW-1:0] in_a_row, in_a_col, in_b_row, in_b_col;
  logic          c_valid, c_last, stall;
  logic [W-1:0]  c_data;
  logic [P-1:0]  phase_done, bypass_hit, drain_active;

  spmm_top dut (.*);

  int checks = 0, failures = 0;
  int n_stall = 0, n_bypass = 0, n_phase = 0, n_drain = 0, n_overlap = 0, n_empty_phase = 0;

  logic signed [W-1:0] A [N][N];
  logic signed [W-1:0] B [N][N];
  logic        [W-1:0] Cref [N][N];
  logic        [W-1:0] Cgot [N][N];
  int words;
  bit seen_last;
  longint cyc = 0;

  always @(posedge clk) cyc <= cyc + 1;

  // mechanism counters
  always @(negedge clk) if (rst_n) begin
    if (stall && (in_a_valid || in_b_valid || in_phase_end)) n_stall++;
    n_bypass += $countones(bypass_hit);
    n_phase  += $countones(phase_done);
    if (|drain_active) n_drain++;
    // an element loaded while some PE is computing
    if (in_ready && (in_a_valid || in_b_valid) && dut.g_pe[0].u_pe.mac_valid) n_overlap++;
  end

  // result collector
  always @(negedge clk) if (c_valid) begin
    int pe, loc, r, c;
    pe  = words / (N * NL);
    loc = words % (N * NL);
    r   = loc / NL;
    c   = (loc % NL) * P + pe;
    if (words < N * N) Cgot[r][c] = c_data;
    if (c_last) begin
      seen_last = 1'b1;
      checks++;
      if (words != N * N - 1) begin
        failures++;
        $display("FAIL c_last on word %0d", words);
      end
    end
    words++;
  end

  // a random non-zero element in -127..127
  function automatic logic [W-1:0] nz();
    logic [W-1:0] v;
    v = W'($urandom_range(127, 1));
    return $urandom_range(1) ? v : -v;
  endfunction

  task automatic gen(input int zero_pct);
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        A[i][j] = ($urandom_range(99) < zero_pct) ? '0 : nz();
        B[i][j] = ($urandom_range(99) < zero_pct) ? '0 : nz();
      end
  endtask

  task automatic reference();
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        logic [W-1:0] s;
        s = '0;
        for (int k = 0; k < N; k++) s += W'(A[i][k] * B[k][j]);
        Cref[i][j] = s;
      end
  endtask

  task automatic beat(input bit av, input int ar, input int ak, input bit bv, input int bk,
                      input int bc, input bit pe_, input bit last_);
    @(negedge clk);
    in_a_valid   = av;
    in_a         = av ? A[ar][ak] : '0;
    in_a_row     = IW'(ar);
    in_a_col     = IW'(ak);
    in_b_valid   = bv;
    in_b         = bv ? B[bk][bc] : '0;
    in_b_row     = IW'(bk);
    in_b_col     = IW'(bc);
    in_phase_end = pe_;
    in_last      = last_;
    #1;
    while (!in_ready) begin
      @(negedge clk);
      #1;
    end
  endtask

  task automatic idle();
    @(negedge clk);
    in_a_valid = 0; in_b_valid = 0; in_phase_end = 0; in_last = 0;
  endtask

  // Stream the product phase by phase. skip_empty leaves out phases with no
  // A or no B element.
  task automatic stream(input bit skip_empty);
    int last_k;
    last_k = N - 1;
    if (skip_empty) begin
      last_k = -1;
      for (int k = 0; k < N; k++) begin
        bit ha, hb;
        ha = 0; hb = 0;
        for (int i = 0; i < N; i++) begin
          if (A[i][k] != 0) ha = 1;
          if (B[k][i] != 0) hb = 1;
        end
        if (ha && hb) last_k = k;
      end
      if (last_k < 0) last_k = 0;
    end
    for (int k = 0; k < N; k++) begin
      int ar [$];
      int bc [$];
      int nb;
      for (int i = 0; i < N; i++) begin
        if (A[i][k] != 0) ar.push_back(i);
        if (B[k][i] != 0) bc.push_back(i);
      end
      if (skip_empty && (ar.size() == 0 || bc.size() == 0) && k != last_k) continue;
      if (ar.size() == 0 || bc.size() == 0) n_empty_phase++;
      nb = (ar.size() > bc.size()) ? ar.size() : bc.size();
      if (nb == 0) nb = 1;
      for (int t = 0; t < nb; t++)
        beat(t < ar.size(), (t < ar.size()) ? ar[t] : 0, k,
             t < bc.size(), k, (t < bc.size()) ? bc[t] : 0,
             t == nb - 1, (t == nb - 1) && (k == last_k));
      if (skip_empty && k == last_k) break;
    end
    idle();
  endtask

  task automatic run_product(input string name, input bit skip_empty, output longint cycles);
    longint t0;
    int errs;
    reference();
    words = 0;
    seen_last = 0;
    t0 = cyc;
    stream(skip_empty);
    while (!seen_last) @(negedge clk);
    cycles = cyc - t0;
    errs = 0;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        checks++;
        if (Cgot[i][j] !== Cref[i][j]) begin
          failures++;
          errs++;
          if (errs < 5) $display("FAIL %s C[%0d][%0d] got %0d exp %0d", name, i, j,
                                 Cgot[i][j], Cref[i][j]);
        end
      end
    checks++;
    if (words != N * N) begin
      failures++;
      $display("FAIL %s: %0d result words", name, words);
    end
    $display("%s: %0d cycles, %0d mismatches", name, cycles, errs);
  endtask

  initial begin
    longint cyc_dense, cyc_sp;
    in_a_valid = 0; in_b_valid = 0; in_phase_end = 0; in_last = 0;
    in_a = '0; in_b = '0; in_a_row = '0; in_a_col = '0; in_b_row = '0; in_b_col = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // wait for the C_MEM clearing after reset
    while (!in_ready) @(negedge clk);

    gen(90);  run_product("sparse90", 0, cyc_sp);
    gen(0);
    run_product("dense", 0, cyc_dense);
    checks++;
    if (cyc_dense > N + N*N*N/P + P + N*N + 16 || cyc_dense < N*N*N/P + N*N) begin
      failures++;
      $display("FAIL dense cycle count %0d outside [%0d, %0d]", cyc_dense,
               N*N*N/P + N*N, N + N*N*N/P + P + N*N + 16);
    end
    $display("mechanisms: stall=%0d bypass=%0d phases=%0d empty_phases=%0d drain_cycles=%0d overlap=%0d",
             n_stall, n_bypass, n_phase, n_empty_phase, n_drain, n_overlap);
    checks += 4;
    if (n_stall == 0)       begin failures++; $display("FAIL no input stall"); end
    if (n_phase == 0)       begin failures++; $display("FAIL no phase computed"); end
    if (n_drain == 0)       begin failures++; $display("FAIL no read-out"); end
    if (n_overlap == 0)     begin failures++; $display("FAIL loading never overlapped computing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
