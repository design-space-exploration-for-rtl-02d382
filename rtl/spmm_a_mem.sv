// A_MEM: double-buffered store for one column of matrix A.
//
// In phase k every PE receives the non-zero elements of column k of A and
// keeps all of them, with their row indices. The memory has two banks of N
// entries (2n in all), so one column can be loaded while the previous one is
// being used by the MACC. Writes go to bank wr_bank at an internal fill
// pointer; bank_close ends the column, records how many elements the bank
// holds (cnt[bank]) and rewinds the pointer. A write and a close may come in
// the same cycle; the element is then counted in the closed bank.
//
// Reads are synchronous: rd_val/rd_row are valid the cycle after rd_en (a
// distributed RAM with its output register). The two-bank organisation and
// the 2n size follow the design; the fill pointer, the count outputs and the
// registered read port are this implementation's choices.
module spmm_a_mem #(
  parameter int unsigned N  = spmm_pkg::N_DEFAULT,
  parameter int unsigned W  = spmm_pkg::W_DEFAULT,
  parameter int unsigned IW = $clog2(N),
  parameter int unsigned CW = $clog2(N + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  // write side (column being loaded)
  input  logic          wr_en,
  input  logic          wr_bank,
  input  logic [W-1:0]  wr_val,
  input  logic [IW-1:0] wr_row,
  input  logic          bank_close,
  output logic [CW-1:0] cnt [2],
  // read side (column being computed)
  input  logic          rd_en,
  input  logic          rd_bank,
  input  logic [IW-1:0] rd_addr,
  output logic [W-1:0]  rd_val,
  output logic [IW-1:0] rd_row
);

  logic [W+IW-1:0] mem [2][N];
  logic [CW-1:0]   wptr;

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_bank][wptr[IW-1:0]] <= {wr_val, wr_row};
    if (rd_en) {rd_val, rd_row} <= mem[rd_bank][rd_addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr   <= '0;
      cnt[0] <= '0;
      cnt[1] <= '0;
    end else if (bank_close) begin
      cnt[wr_bank] <= wptr + CW'(wr_en);
      wptr         <= '0;
    end else if (wr_en) begin
      wptr <= wptr + 1'b1;
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    wr_en |-> wptr < CW'(N))
    else $error("A_MEM: more than N elements in one column");

endmodule
