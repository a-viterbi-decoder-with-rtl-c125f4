// tb_memory_tb: checks the trace-back register array in both write forms.
//
// A parallel and a systolic instance receive the same random decision vectors
// (parallel: vector j goes to column j; systolic: vectors simply arrive in
// order). After each group of 35 vectors a random winning row is injected and
// the decode output is compared with a software trace-back over the same
// vectors: starting at the winner in the newest stage, the decoded bit is the
// state's top bit and the predecessor is {state[4:0], decision}. With no row
// selected decode must be all zero. Some rounds overwrite only part of the
// parallel array to check that untouched columns keep their contents.
module tb_memory_tb;
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

  logic [63:0] par_cols [TB_LEN];   // what the parallel array should hold
  logic [63:0] sys_cols [TB_LEN];   // systolic: index TB_LEN-1 newest

  function automatic logic [TB_LEN-1:0] trace(logic [63:0] cols [TB_LEN], int win);
    logic [TB_LEN-1:0] bits;
    logic [5:0] s = 6'(win);
    for (int k = TB_LEN - 1; k >= 0; k--) begin
      bits[k] = s[5];
      s = {s[4:0], cols[k][s]};
    end
    return bits;
  endfunction

  task automatic check_trace(int win);
    logic [TB_LEN-1:0] ep, es;
    @(negedge clk);
    sel_row = 64'd1 << win;
    #1;
    ep = trace(par_cols, win);
    es = trace(sys_cols, win);
    checks += 2;
    if (dec_p !== ep) begin failures++; $display("FAIL parallel win %0d got %h exp %h", win, dec_p, ep); end
    if (dec_s !== es) begin failures++; $display("FAIL systolic win %0d got %h exp %h", win, dec_s, es); end
    @(negedge clk);
    sel_row = '0;
    #1;
    checks++;
    if (dec_p !== '0 || dec_s !== '0) begin failures++; $display("FAIL decode not idle"); end
  endtask

  initial begin
    wr_en = 0; wr_col = 0; wr_data = 0; sel_row = 0;
    for (int k = 0; k < TB_LEN; k++) begin par_cols[k] = '0; sys_cols[k] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    check_trace(5);
    for (int round = 0; round < 12; round++) begin
      automatic int ncols = (round % 4 == 3) ? $urandom_range(1, 20) : TB_LEN;
      for (int j = 0; j < ncols; j++) begin
        @(negedge clk);
        wr_en = 1; wr_col = COL_W'(j); wr_data = {$urandom, $urandom};
        @(posedge clk);
        par_cols[j] = wr_data;
        for (int k = 0; k < TB_LEN - 1; k++) sys_cols[k] = sys_cols[k+1];
        sys_cols[TB_LEN-1] = wr_data;
        @(negedge clk);
        wr_en = 0;
      end
      for (int w = 0; w < 6; w++) check_trace((w == 0) ? 0 : (w == 1) ? 63 : $urandom_range(0, 63));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
