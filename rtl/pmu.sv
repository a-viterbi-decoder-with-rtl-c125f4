// pmu: path metric unit, the store of all trellis path metrics.
//
// Two banks of NSTATES metrics. During a stage the ACS reads the old metrics
// from bank `bank` (two asynchronous read ports, for the two predecessors)
// while the new metrics are written, one per clock, into the other bank; the
// control unit flips `bank` at every stage boundary. Two banks are needed
// because with one state per clock state s reads metrics 2s and 2s+1, which
// other states of the same stage overwrite in a single bank.
//
// Reset puts state 0 at 0 and every other state at INIT_PM in both banks, as
// the encoder starts from the all-zero state. Bank organisation and reset
// values are this design's own.
//
// Timing: reads are combinational; the write happens on the rising edge when
// we is high. Reset is synchronous, active low.
module pmu
  import vit_pkg::*;
#(
  parameter int N       = NSTATES,
  parameter int W       = PM_W,
  parameter int INIT_PM = 256
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 bank,
  input  logic [$clog2(N)-1:0] raddr0,
  input  logic [$clog2(N)-1:0] raddr1,
  output logic [W-1:0]         rdata0,
  output logic [W-1:0]         rdata1,
  input  logic                 we,
  input  logic [$clog2(N)-1:0] waddr,
  input  logic [W-1:0]         wdata
);

  logic [W-1:0] mem [2][N];

  assign rdata0 = mem[bank][raddr0];
  assign rdata1 = mem[bank][raddr1];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int b = 0; b < 2; b++)
        for (int s = 0; s < N; s++)
          mem[b][s] <= (s == 0) ? '0 : W'(INIT_PM);
    end else if (we) begin
      mem[!bank][waddr] <= wdata;
    end
  end

endmodule
