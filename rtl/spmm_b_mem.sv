// B_MEM: double-buffered store for the part of one row of B that a PE needs.
//
// Columns of C are dealt out to the PEs round-robin: PE J owns the columns
// c with c mod P == J, i.e. local columns l = c div P (0 .. N/P-1). In phase
// k the PE keeps only those non-zero elements of row k of B that fall in its
// own columns, together with their local column index. Each of the two banks
// therefore needs N/P entries (2n/p in all), matching the design's B_MEM.
//
// wr_en offers an element (value and global column index) in every cycle a
// B element passes the PE; the memory itself drops elements of other PEs.
// bank_close ends the row and records the element count of bank wr_bank.
// Reads are synchronous: rd_val/rd_lcol are valid the cycle after rd_en.
// The round-robin ownership follows the data-input example of the design
// (PE0 gets columns 1 and 3, PE1 columns 2 and 4 of a 4-by-4 product with two
// PEs); the ownership filter sitting inside this memory, the counters and
// the registered read port are this implementation's choices.
module spmm_b_mem #(
  parameter int unsigned N   = spmm_pkg::N_DEFAULT,
  parameter int unsigned W   = spmm_pkg::W_DEFAULT,
  parameter int unsigned P   = spmm_pkg::P_DEFAULT,
  parameter int unsigned J   = 0,
  parameter int unsigned IW  = $clog2(N),
  parameter int unsigned NL  = N / P,
  parameter int unsigned LW  = (NL > 1) ? $clog2(NL) : 1,
  parameter int unsigned CW  = $clog2(NL + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          wr_en,
  input  logic          wr_bank,
  input  logic [W-1:0]  wr_val,
  input  logic [IW-1:0] wr_col,
  input  logic          bank_close,
  output logic [CW-1:0] cnt [2],
  input  logic          rd_en,
  input  logic          rd_bank,
  input  logic [LW-1:0] rd_addr,
  output logic [W-1:0]  rd_val,
  output logic [LW-1:0] rd_lcol
);

  logic [W+LW-1:0] mem [2][NL];
  logic [CW-1:0]   wptr;
  logic            owned;
  logic            wr_take;
  logic [LW-1:0]   wr_lcol;

  always_comb begin
    owned   = (32'(wr_col) % P) == J;
    wr_take = wr_en && owned;
    wr_lcol = LW'(32'(wr_col) / P);
  end

  always_ff @(posedge clk) begin
    if (wr_take) mem[wr_bank][wptr[LW-1:0]] <= {wr_val, wr_lcol};
    if (rd_en) {rd_val, rd_lcol} <= mem[rd_bank][rd_addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr   <= '0;
      cnt[0] <= '0;
      cnt[1] <= '0;
    end else if (bank_close) begin
      cnt[wr_bank] <= wptr + CW'(wr_take);
      wptr         <= '0;
    end else if (wr_take) begin
      wptr <= wptr + 1'b1;
    end
  end

  b_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    wr_take |-> wptr < CW'(NL))
    else $error("B_MEM: more than N/P owned elements in one row");

endmodule
