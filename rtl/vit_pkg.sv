// Shared types and helper functions for the error-detecting compare-select-add
// units of a look-ahead Viterbi branch-metric precomputation stage.
//
// reco_mode_t selects how the second ("encoded") run of a recomputing unit
// encodes its operands:
//   RESO   : shift left by K into an (n+K)-bit datapath, nothing is lost.
//   RERO   : zero-extend to n+1 bits, rotate left by K; the extra bit keeps the
//            carry of the most significant bit away from the least significant.
//   M_RESO : shift left by K inside the n-bit datapath; bits shifted out are
//            lost, so only n-K bits of each result can be compared.
// sig() is the register/memory signature: with L lanes, bit i is the XOR of all
// data bits whose index j satisfies j mod L == i (L=1 is plain parity, L=2 is
// the odd/even interleaved parity of the memory example).
package vit_pkg;

  typedef enum logic [1:0] {
    RESO   = 2'd0,
    RERO   = 2'd1,
    M_RESO = 2'd2
  } reco_mode_t;

  // Width of the recomputing datapath for a given mode.
  function automatic int unsigned reco_width(reco_mode_t mode, int unsigned n,
                                             int unsigned k);
    case (mode)
      RESO:    return n + k;
      RERO:    return n + 1;
      default: return n;
    endcase
  endfunction

endpackage
