// Control logic of one PE.
//
// The PE works in phases: in phase k it receives column k of A and row k of B
// (non-zero elements only) and adds their outer product to its columns of C.
// The controller keeps three activities going at once:
//
//  * Loading. Input beats are written into bank wb of A_MEM/B_MEM. A beat
//    with phase_end closes the bank: it is marked full and loading moves to
//    the other bank. A beat with last as well marks the bank as the final
//    phase of the product. The PE can take a beat unless the bank it would go
//    to is still full (ready = 0); beats carrying nothing are always taken.
//  * Computing. While bank rb is full, every stored A element is paired with
//    every stored B element (A outer loop, B inner loop), one pair per cycle;
//    the pair is read from the memories with rd_en and handed to the MACC a
//    cycle later (mac_valid). A phase with no A or no B element costs one
//    cycle. After the last pair the bank is freed, so loading of phase k+1
//    overlaps computing of phase k as in the design's data-input schedule.
//  * Read-out. After the final phase has been computed and the MACC has
//    drained, the PE waits for grant_in from the upstream PE (PE0's grant is
//    tied high), streams its N*N/P words of C_MEM upstream (own_valid, one
//    per cycle, zeroing each word as it is read so C_MEM is clean for the
//    next product), raises grant_out two cycles before its last word, and
//    then forwards the downstream PEs' results (fwd) until it has passed on
//    the word flagged c_last, which the last PE sets on its final word.
//    New phases can be loaded meanwhile, but computing waits until the
//    read-out is over.
//
// After reset the controller first clears C_MEM (DEPTH cycles, ready = 0).
// The control-logic block and its read/write enables follow the design;
// the phase_end/last framing, the grant chain, clear-on-read and the reset
// sweep are this implementation's choices.
module spmm_pe_ctrl
  import spmm_pkg::*;
#(
  parameter int unsigned N       = spmm_pkg::N_DEFAULT,
  parameter int unsigned P       = spmm_pkg::P_DEFAULT,
  parameter bit          LAST_PE = 1'b0,
  parameter int unsigned IW      = $clog2(N),
  parameter int unsigned NL      = N / P,
  parameter int unsigned LW      = (NL > 1) ? $clog2(NL) : 1,
  parameter int unsigned ACW     = $clog2(N + 1),
  parameter int unsigned BCW     = $clog2(NL + 1),
  parameter int unsigned DEPTH   = N * NL,
  parameter int unsigned CAW     = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  // input beat at this PE
  input  logic           en,          // global advance of the systolic chain
  input  logic           in_a_valid,
  input  logic           in_b_valid,
  input  logic           in_phase_end,
  input  logic           in_last,
  output logic           ready,
  // A_MEM / B_MEM write side
  output logic           a_wr_en,
  output logic           b_wr_en,
  output logic           wr_bank,
  output logic           bank_close,
  input  logic [ACW-1:0] a_cnt [2],
  input  logic [BCW-1:0] b_cnt [2],
  // A_MEM / B_MEM read side
  output logic           a_rd_en,
  output logic           b_rd_en,
  output logic           rd_bank,
  output logic [IW-1:0]  a_rd_addr,
  output logic [LW-1:0]  b_rd_addr,
  output logic           mac_valid,
  input  logic           macc_busy,
  // C_MEM access for clearing and read-out
  output logic           c_rd_en,
  output logic [CAW-1:0] c_rd_addr,
  output logic           c_wr_en,
  output logic [CAW-1:0] c_wr_addr,
  // result chain
  input  logic           grant_in,
  output logic           grant_out,
  output logic           own_valid,   // C_MEM read data is a result word this cycle
  output logic           own_last,
  output logic           fwd,         // pass the downstream result chain through
  input  logic           c_in_valid,
  input  logic           c_in_last,
  // status
  output logic           phase_done,  // a phase's computation finished this cycle
  output logic           drain_active
);

  // The grant goes out two cycles before the last own word is read, so that
  // the downstream PE's first word follows the last own word without a gap.
  localparam int unsigned GRANT_AT = (DEPTH >= 2) ? DEPTH - 2 : 0;

  // reset sweep
  logic           initing;
  logic [CAW-1:0] clr_addr;
  // loading
  logic           wb;
  logic [1:0]     full;
  logic [1:0]     final_ph;
  logic           in_beat;
  logic           accept;
  // computing
  logic           rb;
  logic [IW-1:0]  ia;
  logic [LW-1:0]  ib;
  logic           issue;
  logic           last_pair;
  logic           empty_phase;
  logic           can_compute;
  logic           drain_pending;
  // read-out
  cout_state_e    cstate;
  logic [CAW-1:0] out_addr;

  always_comb begin
    in_beat     = in_a_valid || in_b_valid || in_phase_end;
    ready       = !initing && !(in_beat && full[wb]);
    accept      = en && in_beat && ready;
    a_wr_en     = accept && in_a_valid;
    b_wr_en     = accept && in_b_valid;
    bank_close  = accept && in_phase_end;
    wr_bank     = wb;

    can_compute = !initing && full[rb] && !drain_pending && (cstate == COUT_RUN);
    empty_phase = (a_cnt[rb] == '0) || (b_cnt[rb] == '0);
    issue       = can_compute && !empty_phase;
    last_pair   = (ACW'(ia) == a_cnt[rb] - 1'b1) && (BCW'(ib) == b_cnt[rb] - 1'b1);
    phase_done  = can_compute && (empty_phase || last_pair);
    a_rd_en     = issue;
    b_rd_en     = issue;
    rd_bank     = rb;
    a_rd_addr   = ia;
    b_rd_addr   = ib;

    c_rd_en     = (cstate == COUT_OWN);
    c_rd_addr   = out_addr;
    c_wr_en     = initing || (cstate == COUT_OWN);
    c_wr_addr   = initing ? clr_addr : out_addr;
    grant_out   = (cstate == COUT_FWD) || ((cstate == COUT_OWN) && (out_addr >= CAW'(GRANT_AT)));
    fwd         = (cstate == COUT_FWD);
    drain_active = (cstate != COUT_RUN);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      initing       <= 1'b1;
      clr_addr      <= '0;
      wb            <= 1'b0;
      full          <= '0;
      final_ph      <= '0;
      rb            <= 1'b0;
      ia            <= '0;
      ib            <= '0;
      mac_valid     <= 1'b0;
      drain_pending <= 1'b0;
      cstate        <= COUT_RUN;
      out_addr      <= '0;
      own_valid     <= 1'b0;
      own_last      <= 1'b0;
    end else begin
      // reset sweep of C_MEM
      if (initing) begin
        clr_addr <= clr_addr + 1'b1;
        if (clr_addr == CAW'(DEPTH - 1)) initing <= 1'b0;
      end

      // loading
      if (bank_close) begin
        full[wb]     <= 1'b1;
        final_ph[wb] <= in_last;
        wb           <= ~wb;
      end

      // computing
      mac_valid <= issue;
      if (issue) begin
        if (BCW'(ib) == b_cnt[rb] - 1'b1) begin
          ib <= '0;
          ia <= ia + 1'b1;
        end else begin
          ib <= ib + 1'b1;
        end
      end
      if (phase_done) begin
        ia       <= '0;
        ib       <= '0;
        full[rb] <= 1'b0;
        rb       <= ~rb;
        if (final_ph[rb]) drain_pending <= 1'b1;
      end

      // read-out
      own_valid <= (cstate == COUT_OWN);
      own_last  <= (cstate == COUT_OWN) && LAST_PE && (out_addr == CAW'(DEPTH - 1));
      unique case (cstate)
        COUT_RUN:
          if (drain_pending && !mac_valid && !macc_busy) cstate <= COUT_WAIT;
        COUT_WAIT:
          if (grant_in) begin
            cstate   <= COUT_OWN;
            out_addr <= '0;
          end
        COUT_OWN: begin
          out_addr <= out_addr + 1'b1;
          if (out_addr == CAW'(DEPTH - 1)) begin
            if (LAST_PE) begin
              cstate        <= COUT_RUN;
              drain_pending <= 1'b0;
            end else begin
              cstate <= COUT_FWD;
            end
          end
        end
        COUT_FWD:
          if (c_in_valid && c_in_last) begin
            cstate        <= COUT_RUN;
            drain_pending <= 1'b0;
          end
        default: cstate <= COUT_RUN;
      endcase
    end
  end

  // A bank is only refilled after it has been computed.
  p_no_refill: assert property (@(posedge clk) disable iff (!rst_n)
    bank_close |-> !full[wb]);

endmodule
