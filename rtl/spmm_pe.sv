// Processing element J of the linear systolic array.
//
// Data path, as in the design's PE diagram:
//  * A_IN/A_ind_IN and B_IN/B_ind_IN enter, are offered to A_MEM and B_MEM,
//    and are registered once before leaving on the *_OUT ports toward PE J+1.
//    The index ports carry {row, column} of each element (2*log2(N) bits).
//  * C results travel the other way: C_OUT is a register loaded either from
//    this PE's C_MEM (its own results) or from C_IN (results of PE J+1..P-1).
//  * The MACC forms C[a_row][l] += a * b for every stored pair of an A element
//    (value, row) and a B element (value, local column l); the C_MEM address
//    is a_row*(N/P) + l.
//
// Besides the design's data and index registers each link carries valid bits
// for A and B, a phase_end/last framing bit pair and, on the C side, c_valid
// and c_last; grant_in/grant_out order the result read-out (see spmm_pe_ctrl).
// The whole chain advances together: all pass registers load when the global
// enable en is high, and en is the AND of every PE's ready, so a PE whose
// bank is still busy stalls the stream. A PE's input is consumed in the
// cycle it is presented with en high; results leave one word per cycle.
module spmm_pe #(
  parameter int unsigned N    = spmm_pkg::N_DEFAULT,
  parameter int unsigned W    = spmm_pkg::W_DEFAULT,
  parameter int unsigned P    = spmm_pkg::P_DEFAULT,
  parameter int unsigned J    = 0,
  parameter int unsigned FRAC = spmm_pkg::FRAC_DEFAULT,
  parameter int unsigned IW   = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  output logic          ready,
  // A/B stream from PE J-1 (or off-chip memory for PE0)
  input  logic          a_in_valid,
  input  logic [W-1:0]  a_in,
  input  logic [IW-1:0] a_ind_in_row,
  input  logic [IW-1:0] a_ind_in_col,
  input  logic          b_in_valid,
  input  logic [W-1:0]  b_in,
  input  logic [IW-1:0] b_ind_in_row,
  input  logic [IW-1:0] b_ind_in_col,
  input  logic          phase_end_in,
  input  logic          last_in,
  // A/B stream to PE J+1
  output logic          a_out_valid,
  output logic [W-1:0]  a_out,
  output logic [IW-1:0] a_ind_out_row,
  output logic [IW-1:0] a_ind_out_col,
  output logic          b_out_valid,
  output logic [W-1:0]  b_out,
  output logic [IW-1:0] b_ind_out_row,
  output logic [IW-1:0] b_ind_out_col,
  output logic          phase_end_out,
  output logic          last_out,
  // C results from PE J+1 and toward PE J-1 (or off-chip memory for PE0)
  input  logic          c_in_valid,
  input  logic [W-1:0]  c_in,
  input  logic          c_in_last,
  output logic          c_out_valid,
  output logic [W-1:0]  c_out,
  output logic          c_out_last,
  input  logic          grant_in,
  output logic          grant_out,
  // status for observation
  output logic          phase_done,
  output logic          bypass_hit,
  output logic          drain_active
);

  localparam int unsigned NL    = N / P;
  localparam int unsigned LW    = (NL > 1) ? $clog2(NL) : 1;
  localparam int unsigned ACW   = $clog2(N + 1);
  localparam int unsigned BCW   = $clog2(NL + 1);
  localparam int unsigned DEPTH = N * NL;
  localparam int unsigned CAW   = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam bit          LAST_PE = (J == P - 1);

  // control signals
  logic           a_wr_en, b_wr_en, wr_bank, bank_close;
  logic [ACW-1:0] a_cnt [2];
  logic [BCW-1:0] b_cnt [2];
  logic           a_rd_en, b_rd_en, rd_bank, mac_valid;
  logic [IW-1:0]  a_rd_addr;
  logic [LW-1:0]  b_rd_addr;
  logic           ctl_c_rd_en, ctl_c_wr_en;
  logic [CAW-1:0] ctl_c_rd_addr, ctl_c_wr_addr;
  logic           own_valid, own_last, fwd;
  // memory read data
  logic [W-1:0]   a_val, b_val;
  logic [IW-1:0]  a_row;
  logic [LW-1:0]  b_lcol;
  // MACC <-> C_MEM
  logic           m_rd_en, m_wr_en, macc_busy;
  logic [CAW-1:0] m_rd_addr, m_wr_addr, mac_addr;
  logic [W-1:0]   m_wr_data;
  logic           c_rd_en, c_wr_en;
  logic [CAW-1:0] c_rd_addr, c_wr_addr;
  logic [W-1:0]   c_rd_data, c_wr_data;

  spmm_pe_ctrl #(.N(N), .P(P), .LAST_PE(LAST_PE)) u_ctrl (
    .clk, .rst_n, .en,
    .in_a_valid(a_in_valid), .in_b_valid(b_in_valid),
    .in_phase_end(phase_end_in), .in_last(last_in), .ready,
    .a_wr_en, .b_wr_en, .wr_bank, .bank_close, .a_cnt, .b_cnt,
    .a_rd_en, .b_rd_en, .rd_bank, .a_rd_addr, .b_rd_addr, .mac_valid, .macc_busy,
    .c_rd_en(ctl_c_rd_en), .c_rd_addr(ctl_c_rd_addr),
    .c_wr_en(ctl_c_wr_en), .c_wr_addr(ctl_c_wr_addr),
    .grant_in, .grant_out, .own_valid, .own_last, .fwd,
    .c_in_valid, .c_in_last, .phase_done, .drain_active
  );

  spmm_a_mem #(.N(N), .W(W)) u_a_mem (
    .clk, .rst_n, .wr_en(a_wr_en), .wr_bank, .wr_val(a_in), .wr_row(a_ind_in_row),
    .bank_close, .cnt(a_cnt), .rd_en(a_rd_en), .rd_bank, .rd_addr(a_rd_addr),
    .rd_val(a_val), .rd_row(a_row)
  );

  spmm_b_mem #(.N(N), .W(W), .P(P), .J(J)) u_b_mem (
    .clk, .rst_n, .wr_en(b_wr_en), .wr_bank, .wr_val(b_in), .wr_col(b_ind_in_col),
    .bank_close, .cnt(b_cnt), .rd_en(b_rd_en), .rd_bank, .rd_addr(b_rd_addr),
    .rd_val(b_val), .rd_lcol(b_lcol)
  );

  always_comb mac_addr = CAW'(32'(a_row) * NL + 32'(b_lcol));

  spmm_macc #(.W(W), .FRAC(FRAC), .AW(CAW)) u_macc (
    .clk, .rst_n, .in_valid(mac_valid), .a(a_val), .b(b_val), .addr(mac_addr),
    .c_rd_en(m_rd_en), .c_rd_addr(m_rd_addr), .c_rd_data(c_rd_data),
    .c_wr_en(m_wr_en), .c_wr_addr(m_wr_addr), .c_wr_data(m_wr_data),
    .busy(macc_busy), .bypass_hit
  );

  // Computing and read-out/clearing never overlap, so the C_MEM ports are
  // shared by a simple select.
  always_comb begin
    c_rd_en   = m_rd_en || ctl_c_rd_en;
    c_rd_addr = ctl_c_rd_en ? ctl_c_rd_addr : m_rd_addr;
    c_wr_en   = m_wr_en || ctl_c_wr_en;
    c_wr_addr = ctl_c_wr_en ? ctl_c_wr_addr : m_wr_addr;
    c_wr_data = ctl_c_wr_en ? '0 : m_wr_data;
  end

  spmm_c_mem #(.DEPTH(DEPTH), .W(W)) u_c_mem (
    .clk, .rd_en(c_rd_en), .rd_addr(c_rd_addr), .rd_data(c_rd_data),
    .wr_en(c_wr_en), .wr_addr(c_wr_addr), .wr_data(c_wr_data)
  );

  // A/B pass registers (toward PE J+1)
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_out_valid   <= 1'b0;
      a_out         <= '0;
      a_ind_out_row <= '0;
      a_ind_out_col <= '0;
      b_out_valid   <= 1'b0;
      b_out         <= '0;
      b_ind_out_row <= '0;
      b_ind_out_col <= '0;
      phase_end_out <= 1'b0;
      last_out      <= 1'b0;
    end else if (en) begin
      a_out_valid   <= a_in_valid;
      a_out         <= a_in;
      a_ind_out_row <= a_ind_in_row;
      a_ind_out_col <= a_ind_in_col;
      b_out_valid   <= b_in_valid;
      b_out         <= b_in;
      b_ind_out_row <= b_ind_in_row;
      b_ind_out_col <= b_ind_in_col;
      phase_end_out <= phase_end_in;
      last_out      <= last_in;
    end
  end

  // C register (toward PE J-1)
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c_out_valid <= 1'b0;
      c_out       <= '0;
      c_out_last  <= 1'b0;
    end else if (own_valid) begin
      c_out_valid <= 1'b1;
      c_out       <= c_rd_data;
      c_out_last  <= own_last;
    end else if (fwd) begin
      c_out_valid <= c_in_valid;
      c_out       <= c_in;
      c_out_last  <= c_in_last;
    end else begin
      c_out_valid <= 1'b0;
      c_out_last  <= 1'b0;
    end
  end

  // Every element of one phase belongs to the same k: column k of A, row k of B.
  p_same_phase: assert property (@(posedge clk) disable iff (!rst_n)
    (en && a_in_valid && b_in_valid) |-> (a_ind_in_col == b_ind_in_row));

endmodule
