// acs_tb: checks the add-compare-select cell with random metrics, equal sums
// (the tie must keep predecessor 0), and a sum beyond the metric range (must
// saturate).
module acs_tb;
  import vit_pkg::*;
  int checks = 0, failures = 0;

  pm_t  pm0, pm1, norm, pm_new;
  bm_t  bm0, bm1;
  logic dec;

  acs dut (.pm0(pm0), .pm1(pm1), .bm0(bm0), .bm1(bm1), .norm(norm),
           .pm_new(pm_new), .decision(dec));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(int a0, int a1, int b0, int b1, int n);
    int s0, s1, e, ed;
    pm0 = pm_t'(a0); pm1 = pm_t'(a1); bm0 = bm_t'(b0); bm1 = bm_t'(b1); norm = pm_t'(n);
    #1;
    s0 = a0 + b0 - n;
    s1 = a1 + b1 - n;
    ed = (s1 < s0) ? 1 : 0;
    e  = ed ? s1 : s0;
    if (e > 1023) e = 1023;
    checks++;
    if (int'(pm_new) != e || int'(dec) != ed) begin
      failures++;
      $display("FAIL pm %0d %0d bm %0d %0d norm %0d: got %0d/%0d exp %0d/%0d",
               a0, a1, b0, b1, n, pm_new, dec, e, ed);
    end
  endtask

  initial begin
    int a0, a1, n;
    for (int i = 0; i < 3000; i++) begin
      a0 = $urandom_range(0, 600);
      a1 = $urandom_range(0, 600);
      n  = $urandom_range(0, (a0 < a1) ? a0 : a1);
      check(a0, a1, $urandom_range(0, 28), $urandom_range(0, 28), n);
    end
    check(10, 12, 5, 3, 4);       // tie: 11 and 11
    check(0, 0, 0, 0, 0);
    check(1020, 1021, 28, 28, 0); // saturates
    check(100, 40, 0, 28, 40);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
