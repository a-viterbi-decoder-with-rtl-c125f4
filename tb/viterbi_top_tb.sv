// viterbi_top_tb: end-to-end test of the decoder at its default parameters
// (parallel trace-back memory, 35-stage blocks, 64 states). Six blocks of 35
// message bits go through encoding, soft mapping, noise and decoding; the
// checks and the mechanisms counted are described in viterbi_harness.
module viterbi_top_tb;
  import vit_pkg::*;
  logic clk, rst_n, rx_valid, rx_ready, dec_valid, enc_valid, enc_u;
  rx_t rx;
  logic [TB_LEN-1:0] dec_bits;
  logic [COL_W-1:0] stage;
  state_t winner;
  pm_t min_pm;
  logic [NOUT-1:0] enc_v;

  viterbi_top dut (.clk(clk), .rst_n(rst_n), .rx_valid(rx_valid), .rx_ready(rx_ready), .rx(rx),
                   .dec_valid(dec_valid), .dec_bits(dec_bits), .stage(stage), .winner(winner),
                   .min_pm(min_pm), .enc_valid(enc_valid), .enc_u(enc_u), .enc_v(enc_v));

  viterbi_harness #(.NBLOCKS(6), .NAME("parallel")) harness (
    .clk(clk), .rst_n(rst_n), .rx_valid(rx_valid), .rx_ready(rx_ready), .rx(rx),
    .dec_valid(dec_valid), .dec_bits(dec_bits), .stage(stage), .winner(winner),
    .min_pm(min_pm), .enc_valid(enc_valid), .enc_u(enc_u), .enc_v(enc_v));

  // backstop in case the harness never finishes (its own watchdog fires first)
  initial begin
    #2ms;
    $display("TB_RESULT checks=0 failures=1");
    $finish;
  end
endmodule
