// pmu_tb: checks the two-bank path metric store against an array model:
// the reset values (state 0 at 0, all others at 256, in both banks), random
// writes into the bank not being read, and both read ports on either bank.
module pmu_tb;
  import vit_pkg::*;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic   bank, we;
  state_t ra0, ra1, wa;
  pm_t    rd0, rd1, wd;

  pmu dut (.clk(clk), .rst_n(rst_n), .bank(bank), .raddr0(ra0), .raddr1(ra1),
           .rdata0(rd0), .rdata1(rd1), .we(we), .waddr(wa), .wdata(wd));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int model [2][64];

  task automatic check_reads();
    #1;
    checks += 2;
    if (int'(rd0) != model[bank][ra0]) begin
      failures++; $display("FAIL rd0 bank%0d addr %0d got %0d exp %0d", bank, ra0, rd0, model[bank][ra0]);
    end
    if (int'(rd1) != model[bank][ra1]) begin
      failures++; $display("FAIL rd1 bank%0d addr %0d got %0d exp %0d", bank, ra1, rd1, model[bank][ra1]);
    end
  endtask

  initial begin
    bank = 0; we = 0; ra0 = 0; ra1 = 0; wa = 0; wd = 0;
    for (int b = 0; b < 2; b++) for (int s = 0; s < 64; s++) model[b][s] = (s == 0) ? 0 : 256;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int b = 0; b < 2; b++)
      for (int s = 0; s < 64; s++) begin
        bank = b[0]; ra0 = state_t'(s); ra1 = state_t'(63 - s);
        check_reads();
      end
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      if (t % 64 == 0) bank = 1'($urandom);
      we = ($urandom_range(0, 3) != 0);
      wa = state_t'($urandom); wd = pm_t'($urandom);
      ra0 = state_t'($urandom); ra1 = state_t'($urandom);
      check_reads();
      @(posedge clk);
      if (we) model[!bank][wa] = int'(wd);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
