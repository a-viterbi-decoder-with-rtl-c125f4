// smu: survivor memory unit with on-the-fly decoding.
//
// The single-state ACS delivers one decision bit per clock, state 0 first.
// A NSTATES-bit collector gathers them; in the stage's last cycle the complete
// vector (the collector plus the decision arriving that cycle) is written into
// column `col` of the trace-back register array (tb_memory), so each column is
// written once per stage at most. The winner block tracks the smallest new
// path metric in the same cycles.
//
// When `trace` is high (one cycle, after the column of stage TB_LEN has been
// written) the winning state of that stage is driven one-hot into the array
// and `decode` shows the TB_LEN decoded bits of the block; decode[k] is the
// message bit of stage k+1. In every other cycle the row select is all zero,
// so the trace network stays still and decode is 0. The collector is this
// design's way of joining a serial ACS to a column-wide memory write.
//
// Timing: decode is combinational in trace; win_* follow the winner block.
module smu
  import vit_pkg::*;
#(
  parameter int       TB_LEN_P = TB_LEN,
  parameter int       W        = PM_W,
  parameter tb_arch_e ARCH     = TB_PARALLEL
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                valid,     // an ACS result is presented
  input  logic                first,     // it is state 0
  input  logic                last,      // it is state NSTATES-1
  input  state_t              state,
  input  logic                decision,
  input  logic [W-1:0]        pm,
  input  logic [COL_W-1:0]    col,       // column of this stage, 0..TB_LEN_P-1
  input  logic                trace,
  output logic [TB_LEN_P-1:0] decode,
  output state_t              win_state,
  output logic [W-1:0]        win_pm
);

  logic [NSTATES-1:0] collect;
  logic [NSTATES-1:0] vec;
  logic [NSTATES-1:0] sel_row;

  always_ff @(posedge clk) begin
    if (!rst_n)     collect <= '0;
    else if (valid) collect[state] <= decision;
  end

  always_comb begin
    vec        = collect;
    vec[state] = decision;
  end

  winner #(.W(W)) u_winner (
    .clk      (clk),
    .rst_n    (rst_n),
    .valid    (valid),
    .first    (first),
    .last     (last),
    .state    (state),
    .pm       (pm),
    .win_state(win_state),
    .win_pm   (win_pm)
  );

  assign sel_row = trace ? (NSTATES'(1) << win_state) : '0;

  tb_memory #(.TB_LEN_P(TB_LEN_P), .N(NSTATES), .ARCH(ARCH)) u_mem (
    .clk    (clk),
    .rst_n  (rst_n),
    .wr_en  (valid && last),
    .wr_col (col),
    .wr_data(vec),
    .sel_row(sel_row),
    .decode (decode)
  );

endmodule
