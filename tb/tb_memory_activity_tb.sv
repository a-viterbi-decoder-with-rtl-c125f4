// tb_memory_activity_tb: compares the register activity of the two write forms
// of the trace-back array, the property that separates them.
//
// Both instances receive the same stream of random 64-bit decision vectors,
// one per stage, for 10 blocks of 35 stages. At every clock the testbench
// counts the stored bits that changed value (by probing the cells' outputs).
// The parallel form loads one column per stage, the systolic form shifts all
// 35, so for random data the systolic count should be about 35 times the
// parallel one; the test requires at least 10 times. It also requires both
// forms to hold the same set of vectors and decode every block identically.
module tb_memory_activity_tb;
  import vit_pkg::*;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic               wr_en;
  logic [COL_W-1:0]   wr_col;
  logic [63:0]        wr_data, sel_row;
  logic [TB_LEN-1:0]  dec_p, dec_s;

  tb_memory #(.ARCH(TB_PARALLEL)) u_par (.clk(clk), .rst_n(rst_n), .wr_en(wr_en),
    .wr_col(wr_col), .wr_data(wr_data), .sel_row(sel_row), .decode(dec_p));
  tb_memory #(.ARCH(TB_SYSTOLIC)) u_sys (.clk(clk), .rst_n(rst_n), .wr_en(wr_en),
    .wr_col(wr_col), .wr_data(wr_data), .sel_row(sel_row), .decode(dec_s));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint tog_par = 0, tog_sys = 0;
  logic [63:0] snap_par [TB_LEN];
  logic [63:0] snap_sys [TB_LEN];

  always @(negedge clk) begin
    for (int k = 0; k < TB_LEN; k++) begin
      tog_par += $countones(snap_par[k] ^ u_par.q_v[k]);
      tog_sys += $countones(snap_sys[k] ^ u_sys.q_v[k]);
      snap_par[k] = u_par.q_v[k];
      snap_sys[k] = u_sys.q_v[k];
    end
  end

  initial begin
    wr_en = 0; wr_col = 0; wr_data = 0; sel_row = 0;
    for (int k = 0; k < TB_LEN; k++) begin snap_par[k] = '0; snap_sys[k] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int blk = 0; blk < 10; blk++) begin
      for (int j = 0; j < TB_LEN; j++) begin
        @(negedge clk);
        wr_en = 1; wr_col = COL_W'(j); wr_data = {$urandom, $urandom};
        @(negedge clk);
        wr_en = 0;
      end
      @(negedge clk);
      sel_row = 64'd1 << $urandom_range(0, 63);
      #1;
      checks++;
      if (dec_p !== dec_s) begin
        failures++; $display("FAIL block %0d: parallel %h systolic %h", blk, dec_p, dec_s);
      end
      @(negedge clk);
      sel_row = '0;
    end
    $display("register bit toggles over 350 stages: parallel %0d, systolic %0d (ratio %.1f)",
             tog_par, tog_sys, real'(tog_sys) / real'(tog_par));
    checks++;
    if (tog_par == 0 || tog_sys < 10 * tog_par) begin
      failures++; $display("FAIL systolic form does not show the expected higher register activity");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
