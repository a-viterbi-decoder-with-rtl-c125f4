// vit_pkg: constants, types and helper functions shared by the Viterbi decoder.
//
// The decoder targets the DAB convolutional code: constraint length K = 7
// (64 trellis states), rate 1/4, generators 133, 171, 145, 133 (octal) for the
// code bits V3, V2, V1, V0. A trellis state is the encoder shift register
// S0..S5 read with the newest bit S0 as the most significant bit, so the state
// after input u is {u, s[5:1]} and the two predecessors of state s are
// {s[4:0], 0} and {s[4:0], 1}. The seven-bit window {s, d} (input bit followed
// by the six register bits before the shift) then selects the code bits of the
// branch from predecessor {s[4:0], d} into s.
//
// Received symbols are 3-bit soft values (0 = confident 0, 7 = confident 1).
// Path metrics are distances: smaller is better. The trace-back length of 35
// stages and the 64-state, 4-output code follow the DAB decoder being modelled;
// soft width, metric width and the initial metric are this design's choices.
package vit_pkg;

  localparam int K        = 7;               // constraint length
  localparam int SW       = K - 1;           // state width
  localparam int NSTATES  = 1 << SW;         // 64 trellis states
  localparam int NOUT     = 4;               // code bits per message bit
  localparam int SOFT_W   = 3;               // soft symbol width
  localparam int SOFT_MAX = (1 << SOFT_W) - 1;
  localparam int BM_W     = 5;               // holds NOUT * SOFT_MAX = 28
  localparam int PM_W     = 10;              // path metric width
  localparam int TB_LEN   = 35;              // trace-back (decoding) length
  localparam int COL_W    = 6;               // holds a column index 0..TB_LEN-1

  // Generators of V0..V3, bit K-1 = input u, bit 0 = S5 (oldest).
  localparam logic [NOUT*K-1:0] DAB_GEN = {7'o133, 7'o171, 7'o145, 7'o133};

  typedef logic [SW-1:0]              state_t;
  typedef logic [SOFT_W-1:0]          soft_t;
  typedef logic [NOUT-1:0][SOFT_W-1:0] rx_t;    // rx[i] is the soft value of V_i
  typedef logic [BM_W-1:0]            bm_t;
  typedef logic [PM_W-1:0]            pm_t;

  // Write scheme of the trace-back register array.
  typedef enum logic {
    TB_PARALLEL = 1'b0,   // column k loaded only in stage k (low-power form)
    TB_SYSTOLIC = 1'b1    // every column shifts once per stage
  } tb_arch_e;

  // Code bits V_{NOUT-1}..V0 for a K-bit register window {u, S0..S(K-2)}.
  function automatic logic [NOUT-1:0] code_bits(input logic [K-1:0] window);
    logic [NOUT-1:0] v;
    for (int i = 0; i < NOUT; i++) v[i] = ^(window & DAB_GEN[i*K +: K]);
    return v;
  endfunction

endpackage
