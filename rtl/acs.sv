// acs: add-compare-select cell for one trellis state.
//
// Adds each predecessor's path metric to the metric of the branch it takes,
// subtracts norm (the smallest metric of the previous stage, so that metrics
// stay small without ever wrapping), and keeps the smaller sum. decision is 1
// when the predecessor ending in 1 survives; it is the bit stored in the
// trace-back memory. A tie keeps predecessor 0. Saturation at the top of the
// PM_W range is a guard only: with normalisation the metrics stay below
// INIT_PM + 7 * 28, far below 2**PM_W.
//
// One state is processed per clock; 64 clocks make one trellis stage. The
// single-state organisation follows the decoder being modelled, the
// normalisation and tie rule are this design's own.
//
// Timing: purely combinational.
module acs
  import vit_pkg::*;
#(
  parameter int W = PM_W
) (
  input  logic [W-1:0] pm0,
  input  logic [W-1:0] pm1,
  input  bm_t          bm0,
  input  bm_t          bm1,
  input  logic [W-1:0] norm,
  output logic [W-1:0] pm_new,
  output logic         decision
);

  logic [W:0] sum0, sum1, best;

  always_comb begin
    sum0     = {1'b0, pm0} + (W+1)'(bm0) - {1'b0, norm};
    sum1     = {1'b0, pm1} + (W+1)'(bm1) - {1'b0, norm};
    decision = sum1 < sum0;
    best     = decision ? sum1 : sum0;
    pm_new   = best[W] ? '1 : best[W-1:0];
  end

endmodule
