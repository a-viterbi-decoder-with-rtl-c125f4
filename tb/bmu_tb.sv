// bmu_tb: checks the branch metric unit.
//
// For random soft symbol groups and every state, the expected code bits of
// both branches are rebuilt from the named encoder taps (the branch into state
// s from predecessor {s[4:0],d} sees U = s[5], S0..S4 = s[4:0], S5 = d), and the
// metric is the sum of |rx - 7*c| per symbol.
module bmu_tb;
  import vit_pkg::*;
  int checks = 0, failures = 0;

  rx_t    rx;
  state_t st;
  bm_t    bm0, bm1;

  bmu dut (.rx(rx), .state(st), .bm0(bm0), .bm1(bm1));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_bm(rx_t r, state_t s, bit d);
    bit u = s[5], s0 = s[4], s1 = s[3], s2 = s[2], s3 = s[1], s4 = s[0], s5 = d;
    bit [3:0] c;
    int m = 0;
    c[3] = u ^ s1 ^ s2 ^ s4 ^ s5;
    c[2] = u ^ s0 ^ s1 ^ s2 ^ s5;
    c[1] = u ^ s0 ^ s3 ^ s5;
    c[0] = c[3];
    for (int i = 0; i < 4; i++) begin
      int diff = int'(r[i]) - (c[i] ? 7 : 0);
      m += diff < 0 ? -diff : diff;
    end
    return m;
  endfunction

  initial begin
    for (int g = 0; g < 40; g++) begin
      rx = rx_t'($urandom);
      if (g == 0) rx = '0;
      if (g == 1) rx = '1;
      for (int s = 0; s < 64; s++) begin
        st = state_t'(s);
        #1;
        checks += 2;
        if (int'(bm0) != ref_bm(rx, st, 0)) begin
          failures++;
          $display("FAIL bm0 rx=%h s=%0d got %0d exp %0d", rx, s, bm0, ref_bm(rx, st, 0));
        end
        if (int'(bm1) != ref_bm(rx, st, 1)) begin
          failures++;
          $display("FAIL bm1 rx=%h s=%0d got %0d exp %0d", rx, s, bm1, ref_bm(rx, st, 1));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
