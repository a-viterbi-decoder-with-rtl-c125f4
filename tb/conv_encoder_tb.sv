// conv_encoder_tb: checks the convolutional encoder in two configurations.
//
// 1. The 4-state (2,1,3) example code (generators 111 and 101): the message
//    1101110010 must give the code sequence 11 01 01 00 01 10 01 11 11 10.
// 2. The DAB K = 7, rate 1/4 code: 400 random bits are compared against a
//    model that writes each output as the XOR of named register taps
//    (V3 = V0 = U^S1^S2^S4^S5, V2 = U^S0^S1^S2^S5, V1 = U^S0^S3^S5),
//    including a hold (in_valid low) that must not shift the register.
module conv_encoder_tb;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // (2,1,3) example
  logic       s_valid, s_u;
  logic [1:0] s_v;
  conv_encoder #(.K(3), .N(2), .GEN({3'b101, 3'b111})) u_small (
    .clk(clk), .rst_n(rst_n), .in_valid(s_valid), .u(s_u), .v(s_v));

  // DAB code
  logic       d_valid, d_u;
  logic [3:0] d_v;
  conv_encoder u_dab (.clk(clk), .rst_n(rst_n), .in_valid(d_valid), .u(d_u), .v(d_v));

  localparam logic [9:0]  MSG  = 10'b1101110010;             // first bit at the left
  localparam logic [19:0] CODE = 20'b11_01_01_00_01_10_01_11_11_10;

  logic [5:0] S;   // S[0] = S0 (newest) .. S[5] = S5
  logic [3:0] exp_v;

  initial begin
    s_valid = 0; s_u = 0; d_valid = 0; d_u = 0; S = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int t = 0; t < 10; t++) begin
      s_u = MSG[9-t]; s_valid = 1;
      #1;
      checks++;
      if ({s_v[0], s_v[1]} !== CODE[19-2*t -: 2]) begin
        failures++;
        $display("FAIL (2,1,3) t%0d got %b%b exp %b", t, s_v[0], s_v[1], CODE[19-2*t -: 2]);
      end
      @(negedge clk);
    end
    s_valid = 0;

    for (int t = 0; t < 400; t++) begin
      d_u     = 1'($urandom);
      d_valid = (t % 7 != 3);
      #1;
      exp_v[3] = d_u ^ S[1] ^ S[2] ^ S[4] ^ S[5];
      exp_v[2] = d_u ^ S[0] ^ S[1] ^ S[2] ^ S[5];
      exp_v[1] = d_u ^ S[0] ^ S[3] ^ S[5];
      exp_v[0] = exp_v[3];
      checks++;
      if (d_v !== exp_v) begin
        failures++;
        $display("FAIL DAB t%0d got %b exp %b", t, d_v, exp_v);
      end
      if (d_valid) S = {S[4:0], d_u};
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
