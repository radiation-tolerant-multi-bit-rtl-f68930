`timescale 1ps/1ps
// Shared types and helpers of the radiation-tolerant multi-bit flip-flop
// system.
//
// parity_e selects the parity generator flavour of a group: even parity is
// an XOR tree, odd parity an XNOR tree. parity_of() is the reference parity
// function, and zero_parity() is the parity of an all-zero word, which sets
// the reset value of the input-parity flip-flop. err_class_e is the verdict
// of the sample-and-count circuit: no error in the last window, a sporadic
// (radiation-like) error, or a systematic (timing) error.
package mbff_pkg;

  typedef enum logic {
    PARITY_EVEN = 1'b0,
    PARITY_ODD  = 1'b1
  } parity_e;

  typedef enum logic [1:0] {
    ERR_NONE      = 2'd0,
    ERR_RADIATION = 2'd1,
    ERR_TIMING    = 2'd2
  } err_class_e;

  // Parity of an all-zero word: 0 for even (XOR), 1 for odd (XNOR).
  function automatic logic zero_parity(parity_e kind);
    return (kind == PARITY_ODD);
  endfunction

endpackage
