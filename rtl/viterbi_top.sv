// viterbi_top: DAB Viterbi decoder with a register-array trace-back memory,
// and beside it the matching DAB convolutional encoder.
//
// Decoder: a received group of four 3-bit soft symbols (Rx_3..Rx_0) is taken
// per trellis stage. One add-compare-select unit serves all 64 states, one per
// clock: the branch metric unit scores the two branches into the state, the
// path metric unit supplies the two predecessor metrics from the old bank, and
// the ACS writes the survivor metric to the new bank and its decision bit to
// the survivor memory unit. After stage 35 the winning state is injected into
// the trace-back array and the 35 decoded bits of the block appear in one
// cycle; they are captured in dec_bits with a one-cycle dec_valid.
//
// Encoder: an independent rate 1/4, K = 7 encoder with its own ports
// (enc_valid, enc_u, enc_v); it produces the symbols the decoder expects and is
// not connected to it.
//
// Interface and timing: rx is sampled when rx_valid and rx_ready are both high;
// a stage takes 64 clocks; groups may be offered back to back. dec_valid rises
// 2 cycles after the 64th clock of the 35th stage of a block; dec_bits[k] is
// the k-th message bit of that block and holds until the next block. stage
// (1..35), winner and min_pm are status outputs. The block diagram (BMU, ACS,
// PMU, SMU with winner, control unit), the single ACS, the trace length and
// the parallel/systolic memory forms follow the modelled decoder; the
// handshake, metric coding and widths are this design's own.
module viterbi_top
  import vit_pkg::*;
#(
  parameter int       TB_LEN_P = TB_LEN,
  parameter tb_arch_e ARCH     = TB_PARALLEL
) (
  input  logic                clk,
  input  logic                rst_n,
  // decoder input
  input  logic                rx_valid,
  output logic                rx_ready,
  input  rx_t                 rx,
  // decoder output
  output logic                dec_valid,
  output logic [TB_LEN_P-1:0] dec_bits,
  // status
  output logic [COL_W-1:0]    stage,
  output state_t              winner,
  output pm_t                 min_pm,
  // encoder, side by side
  input  logic                enc_valid,
  input  logic                enc_u,
  output logic [NOUT-1:0]     enc_v
);

  // ---------------- control ----------------
  logic             busy, bank, first, last, trace;
  state_t           state;
  logic [COL_W-1:0] col;

  control_unit #(.TB_LEN_P(TB_LEN_P)) u_ctrl (
    .clk     (clk),
    .rst_n   (rst_n),
    .rx_valid(rx_valid),
    .rx_ready(rx_ready),
    .busy    (busy),
    .state   (state),
    .col     (col),
    .bank    (bank),
    .first   (first),
    .last    (last),
    .trace   (trace)
  );

  // received group of the current stage
  rx_t rx_q;
  always_ff @(posedge clk) begin
    if (!rst_n)                   rx_q <= '0;
    else if (rx_valid && rx_ready) rx_q <= rx;
  end

  // ---------------- BMU / PMU / ACS ----------------
  bm_t    bm0, bm1;
  pm_t    pm0, pm1, pm_new, norm;
  logic   decision;
  state_t pred0, pred1;

  assign pred0 = {state[SW-2:0], 1'b0};
  assign pred1 = {state[SW-2:0], 1'b1};

  bmu u_bmu (
    .rx   (rx_q),
    .state(state),
    .bm0  (bm0),
    .bm1  (bm1)
  );

  pmu u_pmu (
    .clk   (clk),
    .rst_n (rst_n),
    .bank  (bank),
    .raddr0(pred0),
    .raddr1(pred1),
    .rdata0(pm0),
    .rdata1(pm1),
    .we    (busy),
    .waddr (state),
    .wdata (pm_new)
  );

  acs u_acs (
    .pm0     (pm0),
    .pm1     (pm1),
    .bm0     (bm0),
    .bm1     (bm1),
    .norm    (norm),
    .pm_new  (pm_new),
    .decision(decision)
  );

  // ---------------- SMU ----------------
  logic [TB_LEN_P-1:0] decode;

  smu #(.TB_LEN_P(TB_LEN_P), .ARCH(ARCH)) u_smu (
    .clk      (clk),
    .rst_n    (rst_n),
    .valid    (busy),
    .first    (first),
    .last     (last),
    .state    (state),
    .decision (decision),
    .pm       (pm_new),
    .col      (col),
    .trace    (trace),
    .decode   (decode),
    .win_state(winner),
    .win_pm   (norm)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      dec_valid <= 1'b0;
      dec_bits  <= '0;
    end else begin
      dec_valid <= trace;
      if (trace) dec_bits <= decode;
    end
  end

  assign stage  = col + 1'b1;
  assign min_pm = norm;

  // ---------------- encoder ----------------
  conv_encoder #(.K(K), .N(NOUT), .GEN(DAB_GEN)) u_enc (
    .clk     (clk),
    .rst_n   (rst_n),
    .in_valid(enc_valid),
    .u       (enc_u),
    .v       (enc_v)
  );

  // a group is only taken between stages or in a stage's last cycle
  a_accept_at_boundary: assert property (@(posedge clk) disable iff (!rst_n)
    (rx_valid && rx_ready) |-> (!busy || last));

endmodule
