// smu_tb: checks the survivor memory unit as the ACS would drive it.
//
// Each stage presents 64 (state, decision, metric) triples, one per clock,
// state 0 first; gaps of idle cycles are inserted between some stages. After
// every 35 stages trace is raised for one cycle and decode must equal a
// software trace-back from the stage-35 minimum-metric state through the
// 35 decision vectors. It also checks the winner outputs after every stage and
// that decode is zero whenever trace is low. After the first block the
// decisions are mostly 1, which steers the traces through state 63, the state
// whose decision arrives in the same cycle as the column write.
module smu_tb;
  import vit_pkg::*;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic             valid, first, last, decision, trace;
  state_t           st, ws;
  pm_t              pm, wp;
  logic [COL_W-1:0] col;
  logic [TB_LEN-1:0] decode;

  smu dut (.clk(clk), .rst_n(rst_n), .valid(valid), .first(first), .last(last),
           .state(st), .decision(decision), .pm(pm), .col(col), .trace(trace),
           .decode(decode), .win_state(ws), .win_pm(wp));

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [63:0] cols [TB_LEN];
  int best_pm, best_st;

  initial begin
    logic [TB_LEN-1:0] exp_bits;
    logic [5:0] s;
    int m;
    valid = 0; first = 0; last = 0; decision = 0; trace = 0; st = 0; pm = 0; col = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int blk = 0; blk < 5; blk++) begin
      for (int k = 0; k < TB_LEN; k++) begin
        best_pm = 1 << 30;
        for (int i = 0; i < 64; i++) begin
          @(negedge clk);
          m = $urandom_range(0, 300);
          valid = 1; first = (i == 0); last = (i == 63); st = state_t'(i);
          decision = (blk == 0) ? 1'($urandom) : ($urandom_range(0, 9) != 0); pm = pm_t'(m); col = COL_W'(k);
          cols[k][i] = decision;
          if (m < best_pm) begin best_pm = m; best_st = i; end
          #1;
          checks++;
          if (decode !== '0) begin failures++; $display("FAIL decode active without trace"); end
        end
        @(negedge clk);
        valid = 0; first = 0; last = 0;
        checks++;
        if (int'(wp) != best_pm || int'(ws) != best_st) begin
          failures++; $display("FAIL winner blk %0d stage %0d got %0d@%0d exp %0d@%0d",
                               blk, k, wp, ws, best_pm, best_st);
        end
        if (k % 5 == 2) repeat (3) @(negedge clk);
      end
      // trace cycle
      trace = 1;
      #1;
      s = 6'(best_st);
      for (int k = TB_LEN - 1; k >= 0; k--) begin
        exp_bits[k] = s[5];
        s = {s[4:0], cols[k][s]};
      end
      checks++;
      if (decode !== exp_bits) begin
        failures++; $display("FAIL block %0d decode %h exp %h", blk, decode, exp_bits);
      end
      @(negedge clk);
      trace = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
