// bmu: branch metric unit for the single-state ACS.
//
// Each cycle the ACS handles one destination state s. Its two incoming
// branches come from predecessors {s[4:0],0} and {s[4:0],1}; the code bits
// the encoder would have sent on branch d are code_bits({s, d}). The metric of
// a branch is the soft distance between those bits and the received symbols,
// sum over i of (c_i ? 7 - rx[i] : rx[i]), so 0 is a perfect match and 28 the
// worst. The distance measure and the soft-value coding are this design's
// choice; the decoder only needs a per-branch likelihood.
//
// Timing: purely combinational.
module bmu
  import vit_pkg::*;
(
  input  rx_t    rx,
  input  state_t state,
  output bm_t    bm0,   // branch from {state[SW-2:0], 0}
  output bm_t    bm1    // branch from {state[SW-2:0], 1}
);

  function automatic bm_t distance(input rx_t r, input logic [NOUT-1:0] c);
    bm_t acc = '0;
    for (int i = 0; i < NOUT; i++)
      acc += c[i] ? bm_t'(SOFT_MAX) - bm_t'(r[i]) : bm_t'(r[i]);
    return acc;
  endfunction

  assign bm0 = distance(rx, code_bits({state, 1'b0}));
  assign bm1 = distance(rx, code_bits({state, 1'b1}));

endmodule
