// MACC: multiply-accumulate P = A*B + C on partial sums kept in C_MEM.
//
// One operation per cycle. An operation (a, b, addr) enters with in_valid;
// in the same cycle the MACC issues the C_MEM read of addr and registers the
// product a*b (signed, shifted right by FRAC bits, kept to W bits). In the
// next cycle the partial sum read from C_MEM is added to the product and
// written back to addr. So the latency is two cycles and the throughput one
// operation per cycle.
//
// Bypass: if an operation reads the address that the previous operation is
// writing in the same cycle, the block RAM returns the stale value; the MACC
// then takes the sum it has just written instead (bypass_hit marks such a
// cycle). Within one phase no two operations share an address, so this only
// happens where one phase's last operations meet the next phase's first.
// Sums wrap modulo 2^W. One MACC per PE and the P = A*B + C form follow the
// design; the two-stage pipeline, the bypass and the wrap-around are this
// implementation's choices.
module spmm_macc #(
  parameter int unsigned W    = spmm_pkg::W_DEFAULT,
  parameter int unsigned FRAC = spmm_pkg::FRAC_DEFAULT,
  parameter int unsigned AW   = 10
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [W-1:0]  a,
  input  logic [W-1:0]  b,
  input  logic [AW-1:0] addr,
  // C_MEM ports
  output logic          c_rd_en,
  output logic [AW-1:0] c_rd_addr,
  input  logic [W-1:0]  c_rd_data,
  output logic          c_wr_en,
  output logic [AW-1:0] c_wr_addr,
  output logic [W-1:0]  c_wr_data,
  // status
  output logic          busy,
  output logic          bypass_hit
);

  logic signed [2*W-1:0] prod_full;
  logic        [W-1:0]   prod_q;
  logic        [AW-1:0]  addr_q;
  logic                  valid_q;
  logic                  byp_q;
  logic        [W-1:0]   byp_data_q;
  logic        [W-1:0]   partial;

  always_comb begin
    prod_full = (signed'(a) * signed'(b)) >>> FRAC;
    c_rd_en   = in_valid;
    c_rd_addr = addr;
    partial   = byp_q ? byp_data_q : c_rd_data;
    c_wr_en   = valid_q;
    c_wr_addr = addr_q;
    c_wr_data = partial + prod_q;
    busy      = valid_q;
    bypass_hit = valid_q && byp_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q    <= 1'b0;
      byp_q      <= 1'b0;
      prod_q     <= '0;
      addr_q     <= '0;
      byp_data_q <= '0;
    end else begin
      valid_q    <= in_valid;
      prod_q     <= prod_full[W-1:0];
      addr_q     <= addr;
      byp_q      <= in_valid && valid_q && (addr == addr_q);
      byp_data_q <= c_wr_data;
    end
  end

endmodule
