// control_unit: sequencer of the serial Viterbi decoder.
//
// A stage starts when a received symbol group is accepted (rx_valid and
// rx_ready). The state counter then runs 0..NSTATES-1, one ACS operation per
// clock, so a stage takes 64 clocks. rx_ready is high when idle and in a
// stage's last cycle, so groups offered back to back are processed with no gap;
// if none is offered the decoder idles. At each stage end the path metric bank
// flips and the column counter (stage 1..TB_LEN, here 0..TB_LEN-1) advances,
// wrapping after TB_LEN. In the cycle after the last column of a block has
// been written, trace is high for exactly one cycle; no column is written in
// that cycle, so the trace sees the finished block. The single-state schedule
// of 64 clocks per stage and the block of TB_LEN stages follow the modelled
// decoder; the handshake and the counter encoding are this design's own.
//
// Timing: all outputs are registered or decoded from registers.
// Reset is synchronous, active low.
module control_unit
  import vit_pkg::*;
#(
  parameter int TB_LEN_P = TB_LEN
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             rx_valid,
  output logic             rx_ready,
  output logic             busy,
  output state_t           state,
  output logic [COL_W-1:0] col,
  output logic             bank,
  output logic             first,
  output logic             last,
  output logic             trace
);

  logic accept;

  assign first    = busy && (state == '0);
  assign last     = busy && (state == state_t'(NSTATES - 1));
  assign rx_ready = !busy || last;
  assign accept   = rx_valid && rx_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      state <= '0;
      col   <= '0;
      bank  <= 1'b0;
      trace <= 1'b0;
    end else begin
      trace <= last && (col == COL_W'(TB_LEN_P - 1));
      if (busy) state <= state + 1'b1;   // wraps to 0 after NSTATES-1
      if (last) begin
        bank <= !bank;
        col  <= (col == COL_W'(TB_LEN_P - 1)) ? '0 : col + 1'b1;
      end
      if (accept)    busy <= 1'b1;
      else if (last) busy <= 1'b0;
    end
  end

endmodule
