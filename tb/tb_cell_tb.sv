// tb_cell_tb: checks the trace-back cell exhaustively: loading and holding the
// stored bit, and for every stored bit and token input pair the outputs
// sel = a|b, up = sel & !bit, lo = sel & bit.
module tb_cell_tb;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic we, data, a, b, up, lo, sel, q;
  tb_cell dut (.clk(clk), .rst_n(rst_n), .we(we), .data(data), .a(a), .b(b),
               .up(up), .lo(lo), .sel(sel), .q(q));

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic model;
  initial begin
    we = 0; data = 0; a = 0; b = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    model = 0;
    for (int t = 0; t < 64; t++) begin
      @(negedge clk);
      we = 1'($urandom); data = 1'($urandom);
      @(posedge clk);
      if (we) model = data;
      #1;
      for (int ab = 0; ab < 4; ab++) begin
        {a, b} = 2'(ab);
        #1;
        checks++;
        if (q !== model || sel !== (a | b) || up !== ((a | b) & ~model) ||
            lo !== ((a | b) & model)) begin
          failures++;
          $display("FAIL t%0d bit=%b a=%b b=%b -> q=%b sel=%b up=%b lo=%b", t, model, a, b, q, sel, up, lo);
        end
      end
      {a, b} = 2'b00;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
