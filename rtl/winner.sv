// winner: finds the state with the smallest path metric in each stage.
//
// The single-state ACS produces the new metrics one per clock, state 0 first
// (first = 1) and state NSTATES-1 last (last = 1). A running compare keeps the
// smallest metric seen so far and its state; on the last metric the result is
// published on win_pm / win_state, where it stays for the whole next stage.
// win_pm normalises the next stage's metrics and, after the final stage of a
// block, win_state picks the row where the trace-back starts. A tie keeps the
// lower state number. The running compare is this design's choice.
//
// Timing: win_* change on the rising edge of the cycle with last = 1 and
// valid = 1. Reset (synchronous, active low) clears them to state 0, metric 0.
module winner
  import vit_pkg::*;
#(
  parameter int W = PM_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         valid,
  input  logic         first,
  input  logic         last,
  input  state_t       state,
  input  logic [W-1:0] pm,
  output state_t       win_state,
  output logic [W-1:0] win_pm
);

  state_t       run_state;
  logic [W-1:0] run_pm;
  state_t       best_state;
  logic [W-1:0] best_pm;

  // best of the running minimum and the metric presented this cycle
  always_comb begin
    if (first || pm < run_pm) begin
      best_state = state;
      best_pm    = pm;
    end else begin
      best_state = run_state;
      best_pm    = run_pm;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      run_state <= '0;
      run_pm    <= '0;
      win_state <= '0;
      win_pm    <= '0;
    end else if (valid) begin
      run_state <= best_state;
      run_pm    <= best_pm;
      if (last) begin
        win_state <= best_state;
        win_pm    <= best_pm;
      end
    end
  end

endmodule
