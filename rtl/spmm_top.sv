// Sparse matrix-matrix multiplier: a linear systolic array of P PEs.
//
// The array computes C = A * B for N-by-N matrices with W-bit fixed-point
// elements, using only the non-zero elements of A and B. The product is
// formed as a sum of N outer products: in phase k the host streams the
// non-zero elements of column k of A and of row k of B, each with its
// {row, column} index. Only PE0 talks to the host (the off-chip memory): the
// A/B stream enters PE0 and is passed from PE to PE toward PE P-1, and every
// PE picks out what it needs. PE J owns the columns c of C with c mod P == J
// and keeps them, as partial sums, in its own C_MEM.
//
// Input protocol: one beat per cycle, offered on the in_* ports. A beat may
// carry an A element (a_valid), a B element (b_valid), both or neither.
// phase_end marks the last beat of a phase (it may also carry elements, or be
// an otherwise empty beat); last together with phase_end marks the final
// phase of the product. A beat is consumed in a cycle where in_ready is
// high; in_ready may depend on the beat offered (it is low only when a PE
// must still finish an earlier phase before it can store the new one). All
// N phases may be sent; phases whose A column or B row is empty may be left
// out, as long as the last phase sent carries last.
//
// Output protocol: after the final phase, the results leave PE0 one word per
// cycle on c_valid/c_data, N*N words in all, with c_last on the final one:
// first PE0's words, then PE1's, and so on. Within PE J the order is row
// major over its own columns: word a*(N/P)+l is C[a][l*P+J]. The host must
// take a word in every cycle c_valid is high.
//
// Timing: a phase with n_a A elements and n_b(J) B elements owned by PE J
// keeps PE J busy for n_a*n_b(J) cycles (one MACC operation per cycle,
// at least one cycle per phase), and phase k+1 is loaded while phase k is
// computed. For dense matrices that gives N + N^3/P + P cycles plus a few
// cycles of pipeline latency, followed by N*N cycles of read-out. After
// reset the PEs clear their C_MEM (N*N/P cycles) with in_ready low.
//
// The status outputs (phase_done, bypass_hit, drain_active per PE, and
// stall) let a testbench observe the mechanisms; they have no role in the
// protocol.
module spmm_top #(
  parameter int unsigned N    = spmm_pkg::N_DEFAULT,
  parameter int unsigned W    = spmm_pkg::W_DEFAULT,
  parameter int unsigned P    = spmm_pkg::P_DEFAULT,
  parameter int unsigned FRAC = spmm_pkg::FRAC_DEFAULT,
  parameter int unsigned IW   = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  // A/B input stream from off-chip memory
  input  logic          in_a_valid,
  input  logic [W-1:0]  in_a,
  input  logic [IW-1:0] in_a_row,
  input  logic [IW-1:0] in_a_col,
  input  logic          in_b_valid,
  input  logic [W-1:0]  in_b,
  input  logic [IW-1:0] in_b_row,
  input  logic [IW-1:0] in_b_col,
  input  logic          in_phase_end,
  input  logic          in_last,
  output logic          in_ready,
  // C result stream to off-chip memory
  output logic          c_valid,
  output logic [W-1:0]  c_data,
  output logic          c_last,
  // observation
  output logic          stall,
  output logic [P-1:0]  phase_done,
  output logic [P-1:0]  bypass_hit,
  output logic [P-1:0]  drain_active
);

  // Link j is the A/B output of PE j (the input of PE j+1); the input of PE0
  // comes from the ports. Result link j is the C output of PE j; the last PE
  // has an idle result input. grant[j] is the grant out of PE j.
  logic          a_v    [P];
  logic [W-1:0]  a_d    [P];
  logic [IW-1:0] a_r    [P];
  logic [IW-1:0] a_c    [P];
  logic          b_v    [P];
  logic [W-1:0]  b_d    [P];
  logic [IW-1:0] b_r    [P];
  logic [IW-1:0] b_c    [P];
  logic          pe_l   [P];
  logic          last_l [P];
  logic          c_v    [P];
  logic [W-1:0]  c_d    [P];
  logic          c_l    [P];
  logic          grant  [P];
  logic [P-1:0]  ready;
  logic          en;

  always_comb begin
    en       = &ready;
    in_ready = en;
    stall    = !en;
    c_valid  = c_v[0];
    c_data   = c_d[0];
    c_last   = c_l[0];
  end

  for (genvar j = 0; j < P; j++) begin : g_pe
    logic          ai_v, bi_v, pei, lasti, ci_v, ci_l, gi;
    logic [W-1:0]  ai_d, bi_d, ci_d;
    logic [IW-1:0] ai_r, ai_c, bi_r, bi_c;

    if (j == 0) begin : g_first
      always_comb begin
        ai_v = in_a_valid;  ai_d = in_a;  ai_r = in_a_row;  ai_c = in_a_col;
        bi_v = in_b_valid;  bi_d = in_b;  bi_r = in_b_row;  bi_c = in_b_col;
        pei  = in_phase_end;
        lasti = in_last;
        gi   = 1'b1;                 // the host takes results whenever they come
      end
    end else begin : g_next
      always_comb begin
        ai_v = a_v[j-1];  ai_d = a_d[j-1];  ai_r = a_r[j-1];  ai_c = a_c[j-1];
        bi_v = b_v[j-1];  bi_d = b_d[j-1];  bi_r = b_r[j-1];  bi_c = b_c[j-1];
        pei  = pe_l[j-1];
        lasti = last_l[j-1];
        gi   = grant[j-1];
      end
    end

    if (j == P - 1) begin : g_lastpe
      always_comb begin
        ci_v = 1'b0;  ci_d = '0;  ci_l = 1'b0;
      end
    end else begin : g_midpe
      always_comb begin
        ci_v = c_v[j+1];  ci_d = c_d[j+1];  ci_l = c_l[j+1];
      end
    end

    spmm_pe #(.N(N), .W(W), .P(P), .J(j), .FRAC(FRAC)) u_pe (
      .clk, .rst_n, .en, .ready(ready[j]),
      .a_in_valid(ai_v), .a_in(ai_d), .a_ind_in_row(ai_r), .a_ind_in_col(ai_c),
      .b_in_valid(bi_v), .b_in(bi_d), .b_ind_in_row(bi_r), .b_ind_in_col(bi_c),
      .phase_end_in(pei), .last_in(lasti),
      .a_out_valid(a_v[j]), .a_out(a_d[j]), .a_ind_out_row(a_r[j]), .a_ind_out_col(a_c[j]),
      .b_out_valid(b_v[j]), .b_out(b_d[j]), .b_ind_out_row(b_r[j]), .b_ind_out_col(b_c[j]),
      .phase_end_out(pe_l[j]), .last_out(last_l[j]),
      .c_in_valid(ci_v), .c_in(ci_d), .c_in_last(ci_l),
      .c_out_valid(c_v[j]), .c_out(c_d[j]), .c_out_last(c_l[j]),
      .grant_in(gi), .grant_out(grant[j]),
      .phase_done(phase_done[j]), .bypass_hit(bypass_hit[j]), .drain_active(drain_active[j])
    );
  end

endmodule
