// viterbi_harness: stimulus and checking for an end-to-end run of viterbi_top.
//
// The harness owns clock and reset. It builds NBLOCKS message blocks of 35
// bits (the first one is 35'h713922f2b, bit k = k-th message bit; the rest are
// random), encodes them with its own model of the DAB encoder written as named
// register taps, maps each code bit to a 3-bit soft value (0 or 7) and feeds
// the groups to the decoder through the rx_valid/rx_ready handshake. From the
// third block on, soft values get mild noise (up to 2 steps) and one symbol
// per block is flipped completely, so the decoder must correct errors; some
// blocks are fed with idle gaps, others back to back.
//
// It checks: every decoded block against the message; the decoder's own
// encoder port (enc_v) against the model; that a back-to-back stage takes 64
// clocks; that the first block ends in winning state 56; that a block fed back to back is decoded 35*64+1 clocks after its
// first group was accepted; and that the stage counter wraps 1..35. It counts
// each mechanism - idle gaps (stalls), back-to-back stages, trace-backs,
// normalisation by a nonzero minimum metric, corrected symbol errors - and
// counts a failure for any that never happened.
module viterbi_harness
  import vit_pkg::*;
#(
  parameter int    NBLOCKS = 6,
  parameter string NAME    = "viterbi"
) (
  output logic                clk,
  output logic                rst_n,
  output logic                rx_valid,
  input  logic                rx_ready,
  output rx_t                 rx,
  input  logic                dec_valid,
  input  logic [TB_LEN-1:0]   dec_bits,
  input  logic [COL_W-1:0]    stage,
  input  state_t              winner,
  input  pm_t                 min_pm,
  output logic                enc_valid,
  output logic                enc_u,
  input  logic [NOUT-1:0]     enc_v
);
  localparam int NBITS = NBLOCKS * TB_LEN;

  int checks = 0, failures = 0;
  longint cycle = 0;

  initial clk = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (NBITS * 64 * 2 + 5000) @(posedge clk);
    failures++;
    $display("%s: watchdog expired", NAME);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit          msg    [NBITS];
  logic [3:0]  code   [NBITS];
  rx_t         sym    [NBITS];
  bit          stalls_in_block [NBLOCKS];
  longint      accept_cycle [NBITS];

  // counters of mechanisms
  int n_stall = 0, n_b2b = 0, n_trace = 0, n_norm = 0, n_flip = 0, n_noisy = 0;
  int n_decoded = 0;

  // ---------- stimulus generation ----------
  task automatic build();
    logic [5:0] S = '0;  // S[0] = S0 newest
    logic [34:0] first_blk = 35'h713922f2b;
    for (int i = 0; i < NBITS; i++) begin
      bit u = (i < TB_LEN) ? first_blk[i] : bit'($urandom);
      msg[i] = u;
      code[i][3] = u ^ S[1] ^ S[2] ^ S[4] ^ S[5];
      code[i][2] = u ^ S[0] ^ S[1] ^ S[2] ^ S[5];
      code[i][1] = u ^ S[0] ^ S[3] ^ S[5];
      code[i][0] = code[i][3];
      S = {S[4:0], u};
    end
    for (int b = 0; b < NBLOCKS; b++) begin
      int flip_stage = $urandom_range(6, 20);
      int flip_sym   = $urandom_range(0, 3);
      stalls_in_block[b] = (b % 2 == 1);
      for (int k = 0; k < TB_LEN; k++) begin
        int i = b * TB_LEN + k;
        for (int j = 0; j < 4; j++) begin
          int v = code[i][j] ? 7 : 0;
          if (b >= 2 && k < 28 && $urandom_range(0, 3) == 0) begin
            int d = $urandom_range(1, 2);
            v = code[i][j] ? v - d : v + d;
            n_noisy++;
          end
          if (b >= 2 && k == flip_stage && j == flip_sym) begin
            v = code[i][j] ? 0 : 7;
            n_flip++;
          end
          sym[i][j] = soft_t'(v);
        end
      end
    end
  endtask

  // ---------- driver ----------
  initial begin
    rst_n = 0; rx_valid = 0; rx = '0; enc_valid = 0; enc_u = 0;
    build();
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < NBITS; i++) begin
      automatic int b = i / TB_LEN;
      if (stalls_in_block[b] && (i % 7 == 3)) begin
        @(negedge clk);
        rx_valid = 0;
        repeat ($urandom_range(1, 70)) @(negedge clk);
        n_stall++;
      end else begin
        @(negedge clk);
      end
      rx_valid  = 1;
      rx        = sym[i];
      enc_valid = 1;
      enc_u     = msg[i];
      #1;
      checks++;
      if (enc_v !== code[i]) begin
        failures++; $display("%s: FAIL encoder bit %0d got %b exp %b", NAME, i, enc_v, code[i]);
      end
      while (!rx_ready) begin
        enc_valid = 0;
        @(negedge clk);
        #1;
      end
      enc_valid = 1;
      @(posedge clk);
      #1;
      accept_cycle[i] = cycle;
      enc_valid = 0;
      if (i > 0 && accept_cycle[i] - accept_cycle[i-1] == 64) n_b2b++;
      if (i > 0 && !(stalls_in_block[b] && (i % 7 == 3))) begin
        checks++;
        if (accept_cycle[i] - accept_cycle[i-1] != 64) begin
          failures++; $display("%s: FAIL stage %0d took %0d cycles", NAME, i, accept_cycle[i] - accept_cycle[i-1]);
        end
      end
    end
    @(negedge clk);
    rx_valid = 0;
  end

  // ---------- monitor ----------
  int last_stage = 0;
  initial begin
    @(posedge rst_n);
    forever begin
      @(negedge clk);
      if (int'(stage) != last_stage) begin
        // stage only steps by one and wraps 35 -> 1
        checks++;
        if (!(int'(stage) == last_stage + 1 || (last_stage == TB_LEN && stage == 1) ||
              (last_stage == 0 && stage == 1))) begin
          failures++; $display("%s: FAIL stage %0d -> %0d", NAME, last_stage, stage);
        end
        if (min_pm != '0) n_norm++;
        last_stage = int'(stage);
      end
      if (dec_valid) begin
        logic [TB_LEN-1:0] exp_bits;
        automatic int b = n_decoded;
        for (int k = 0; k < TB_LEN; k++) exp_bits[k] = msg[b * TB_LEN + k];
        checks++;
        if (dec_bits !== exp_bits) begin
          failures++; $display("%s: FAIL block %0d decoded %h exp %h", NAME, b, dec_bits, exp_bits);
        end else begin
          $display("%s: block %0d decoded %h (winner state %0d)", NAME, b, dec_bits, winner);
        end
        if (b == 0) begin
          // the first block ends in state {1,1,1,0,0,0} = 56 (last six bits)
          checks++;
          if (winner != state_t'(56)) begin
            failures++; $display("%s: FAIL block 0 winner %0d, expected 56", NAME, winner);
          end
        end
        if (!stalls_in_block[b]) begin
          checks++;
          if (cycle - accept_cycle[b * TB_LEN] != TB_LEN * 64 + 1) begin
            failures++;
            $display("%s: FAIL block %0d latency %0d cycles, expected %0d", NAME, b,
                     cycle - accept_cycle[b * TB_LEN], TB_LEN * 64 + 1);
          end
        end
        n_trace++;
        n_decoded++;
        if (n_decoded == NBLOCKS) begin
          repeat (5) @(negedge clk);
          checks++;
          if (n_stall == 0) begin failures++; $display("%s: FAIL no stall happened", NAME); end
          checks++;
          if (n_b2b == 0) begin failures++; $display("%s: FAIL no back-to-back stage", NAME); end
          checks++;
          if (n_norm == 0) begin failures++; $display("%s: FAIL no nonzero normalisation", NAME); end
          checks++;
          if (n_flip == 0 || n_noisy == 0) begin failures++; $display("%s: FAIL no errors injected", NAME); end
          $display("%s: stalls %0d back-to-back %0d traces %0d nonzero-norm stages %0d noisy symbols %0d flipped symbols %0d",
                   NAME, n_stall, n_b2b, n_trace, n_norm, n_noisy, n_flip);
          $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
          $finish;
        end
      end
    end
  end
endmodule
