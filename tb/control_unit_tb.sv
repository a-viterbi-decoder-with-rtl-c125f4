// control_unit_tb: checks the decoder sequencer cycle by cycle against a
// reference model: a stage lasts exactly 64 busy clocks with the state counter
// running 0..63, groups are accepted only when idle or in a stage's last
// cycle, the column advances and the bank flips at every stage end, the column
// wraps after 35 stages, and trace is a single-cycle pulse right after the
// 35th stage. rx_valid is random, so both idle gaps and back-to-back stages
// occur; both are counted.
module control_unit_tb;
  import vit_pkg::*;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic             rx_valid, rx_ready, busy, bank, first, last, trace;
  state_t           st;
  logic [COL_W-1:0] col;

  control_unit dut (.clk(clk), .rst_n(rst_n), .rx_valid(rx_valid), .rx_ready(rx_ready),
                    .busy(busy), .state(st), .col(col), .bank(bank), .first(first),
                    .last(last), .trace(trace));

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model state
  bit m_busy, m_bank, m_trace;
  int m_state, m_col, traces, idles, b2b, stages;

  initial begin
    rx_valid = 0;
    m_busy = 0; m_bank = 0; m_trace = 0; m_state = 0; m_col = 0;
    traces = 0; idles = 0; b2b = 0; stages = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    while (stages < 80) begin
      bit m_last, m_ready, acc;
      @(negedge clk);
      rx_valid = ($urandom_range(0, 9) != 0);
      #1;
      m_last  = m_busy && m_state == 63;
      m_ready = !m_busy || m_last;
      checks++;
      if (busy !== m_busy || int'(st) != m_state || int'(col) != m_col || bank !== m_bank ||
          trace !== m_trace || last !== m_last || rx_ready !== m_ready ||
          first !== (m_busy && m_state == 0)) begin
        failures++;
        $display("FAIL t=%0t busy %b/%b state %0d/%0d col %0d/%0d bank %b/%b trace %b/%b ready %b/%b",
                 $time, busy, m_busy, st, m_state, col, m_col, bank, m_bank, trace, m_trace, rx_ready, m_ready);
      end
      if (!m_busy) idles++;
      if (trace) traces++;
      acc = rx_valid && m_ready;
      if (acc && m_last) b2b++;
      // advance model to the next edge
      m_trace = m_last && m_col == TB_LEN - 1;
      if (m_busy) m_state = (m_state + 1) % 64;
      if (m_last) begin
        m_bank = !m_bank;
        m_col  = (m_col == TB_LEN - 1) ? 0 : m_col + 1;
        stages++;
      end
      if (acc) m_busy = 1; else if (m_last) m_busy = 0;
    end
    checks++;
    if (traces != 2) begin failures++; $display("FAIL %0d trace pulses in 80 stages, expected 2", traces); end
    checks++;
    if (idles == 0 || b2b == 0) begin failures++; $display("FAIL idle %0d back-to-back %0d", idles, b2b); end
    $display("idle cycles %0d, back-to-back stages %0d, traces %0d", idles, b2b, traces);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
