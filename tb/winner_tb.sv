// winner_tb: feeds random stages of 64 path metrics (state 0 first, with idle
// cycles in between) and checks that after each stage win_pm / win_state hold
// the smallest metric and the lowest state that has it, and that they do not
// change during the following stage until its last metric.
module winner_tb;
  import vit_pkg::*;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic   valid, first, last;
  state_t st, ws;
  pm_t    pm, wp;

  winner dut (.clk(clk), .rst_n(rst_n), .valid(valid), .first(first), .last(last),
              .state(st), .pm(pm), .win_state(ws), .win_pm(wp));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int metrics [64];
  int exp_pm, exp_st, prev_pm, prev_st;

  initial begin
    valid = 0; first = 0; last = 0; st = 0; pm = 0;
    prev_pm = 0; prev_st = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int g = 0; g < 60; g++) begin
      exp_pm = 1 << 30;
      for (int s = 0; s < 64; s++) begin
        metrics[s] = (g % 3 == 0) ? $urandom_range(0, 7) : $urandom_range(0, 1023);
        if (metrics[s] < exp_pm) begin exp_pm = metrics[s]; exp_st = s; end
      end
      for (int s = 0; s < 64; s++) begin
        @(negedge clk);
        valid = 1; first = (s == 0); last = (s == 63); st = state_t'(s); pm = pm_t'(metrics[s]);
        checks++;
        if (int'(wp) != prev_pm || int'(ws) != prev_st) begin
          failures++; $display("FAIL held value changed in stage %0d", g);
        end
      end
      @(negedge clk);
      valid = 0; first = 0; last = 0;
      checks++;
      if (int'(wp) != exp_pm || int'(ws) != exp_st) begin
        failures++;
        $display("FAIL stage %0d got %0d@%0d exp %0d@%0d", g, wp, ws, exp_pm, exp_st);
      end
      prev_pm = exp_pm; prev_st = exp_st;
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
