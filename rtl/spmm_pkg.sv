// Shared constants and types of the sparse matrix-matrix multiplier.
//
// The array computes C = A * B for n-by-n matrices whose non-zero elements
// are streamed in with their row and column indices. The defaults below are
// the evaluated configuration: 256-by-256 problems with 16-bit fixed-point
// data. The number of PEs was swept from 4 to 64; 64 is taken as the default
// here (the largest configuration, best energy-delay product for dense and
// 70%-sparse inputs). The fraction-bit count of the fixed-point format is
// not fixed by the design; 0 (plain integers) is this implementation's choice.
package spmm_pkg;

  localparam int unsigned N_DEFAULT    = 256;  // problem (block) size n
  localparam int unsigned W_DEFAULT    = 16;   // data width w
  localparam int unsigned P_DEFAULT    = 64;   // number of PEs p
  localparam int unsigned FRAC_DEFAULT = 0;    // fraction bits of the fixed-point format

  // State of a PE's result read-out.
  //   COUT_RUN  : computing (or idle); no result traffic
  //   COUT_WAIT : all phases computed, waiting for the upstream PE's grant
  //   COUT_OWN  : streaming this PE's own C_MEM contents upstream
  //   COUT_FWD  : forwarding the results of the downstream PEs
  typedef enum logic [1:0] {
    COUT_RUN  = 2'd0,
    COUT_WAIT = 2'd1,
    COUT_OWN  = 2'd2,
    COUT_FWD  = 2'd3
  } cout_state_e;

endpackage
