// tb_cell: one bit of the register-based trace-back memory.
//
// The cell stores the decision bit of one state in one stage. During a trace a
// single one-hot token runs back through the array: it arrives on input a
// (from a zone A cell, states 0-31, of the next stage) or b (from a zone B
// cell, states 32-63). sel = a | b flags that the surviving path passes this
// state in this stage, and the stored bit steers the token on to the
// predecessor: up when the bit is 0 (predecessor {s[4:0],0}), lo when it is 1
// (predecessor {s[4:0],1}). Outside a trace no token is present, so none of
// this logic switches. The structure - register, token select, steering by the
// stored bit - is the cell of the modelled decoder; the load enable (which an
// ASIC flow turns into a gated clock) is this design's form of its column clock.
//
// Timing: up, lo and sel are combinational in a, b and the stored bit; the bit
// is loaded on the rising edge when we is high. Reset is synchronous, active low.
module tb_cell (
  input  logic clk,
  input  logic rst_n,
  input  logic we,
  input  logic data,
  input  logic a,
  input  logic b,
  output logic up,
  output logic lo,
  output logic sel,
  output logic q
);

  always_ff @(posedge clk) begin
    if (!rst_n)  q <= 1'b0;
    else if (we) q <= data;
  end

  assign sel = a | b;
  assign up  = sel & ~q;
  assign lo  = sel &  q;

endmodule
