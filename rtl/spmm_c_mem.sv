// C_MEM: the PE's share of matrix C, N*N/P words of W bits.
//
// PE J holds rows 0..N-1 of its N/P columns; word a*(N/P)+l holds C[a][l*P+J].
// The memory keeps the partial sums between phases and the final results
// until they are read out. It is a simple dual-port block RAM: one
// synchronous read port (rd_data is valid the cycle after rd_en) and one
// write port. A read and a write of the same address in one cycle return the
// old contents (read-before-write); the MACC bypasses this case itself.
// The size and the use of block RAM follow the design; the port arrangement
// and the read-before-write behaviour are this implementation's choices. The
// memory has no reset: the PE clears it after reset and while reading out.
module spmm_c_mem #(
  parameter int unsigned DEPTH = spmm_pkg::N_DEFAULT * spmm_pkg::N_DEFAULT / spmm_pkg::P_DEFAULT,
  parameter int unsigned W     = spmm_pkg::W_DEFAULT,
  parameter int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output logic [W-1:0]  rd_data,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [W-1:0]  wr_data
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_addr];
    if (wr_en) mem[wr_addr] <= wr_data;
  end

endmodule
