// conv_encoder: feed-forward rate 1/N convolutional encoder.
//
// A (K-1)-bit shift register S0..S(K-2) holds the last message bits, S0 the
// newest. For each bit u the N code bits are the XOR of the taps that the
// generator masks select from the window {u, S0, ..., S(K-2)}; bit K-1 of a
// mask is u and bit 0 is the oldest register bit. Generator i is
// GEN[i*K +: K] and produces v[i].
//
// The defaults are the DAB encoder: K = 7 with V3 = V0 = 133, V2 = 171 and
// V1 = 145 (octal). With K = 3, N = 2, GEN = {3'b101, 3'b111} it is the
// textbook 4-state (2,1,3) code. The tap sets follow the DAB encoder being
// decoded; the valid strobe and the reset to the all-zero state are this
// design's own.
//
// Timing: v is combinational in u and the register; the register shifts on
// the rising clock edge when in_valid is high. Reset is synchronous, active low.
module conv_encoder #(
  parameter int              K   = 7,
  parameter int              N   = 4,
  parameter logic [N*K-1:0]  GEN = {7'o133, 7'o171, 7'o145, 7'o133}
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic         u,
  output logic [N-1:0] v
);

  logic [K-2:0] sreg;   // sreg[K-2] = S0 (newest), sreg[0] = oldest
  logic [K-1:0] window;

  assign window = {u, sreg};

  always_comb begin
    for (int i = 0; i < N; i++) v[i] = ^(window & GEN[i*K +: K]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n)        sreg <= '0;
    else if (in_valid) sreg <= window[K-1:1];
  end

endmodule
