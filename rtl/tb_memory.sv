// tb_memory: register-array trace-back memory that decodes on the fly.
//
// TB_LEN columns (stages) of NSTATES tb_cells. Column k (k = 0 is stage 1)
// holds the decision bits of stage k+1. The cells are linked along the trellis:
// cell s of column k takes its a input from cell s>>1 of column k+1 (zone A,
// states 0..N/2-1) and its b input from cell N/2 + (s>>1) (zone B), choosing
// that cell's up output for even s and lo for odd s. A one-hot sel_row drives
// the last column (stage TB_LEN) at the winning state; the token then ripples
// combinationally to column 0 along the survivor path. The token sits in zone
// B exactly when the state's newest input bit is 1, so decode[k] is the OR of
// the sel outputs of column k's zone B cells. The decoded block thus appears
// without any read-out cycle. With sel_row all zero nothing toggles.
//
// Columns are written with a whole NSTATES-bit decision vector, two ways:
//   TB_PARALLEL  the vector is broadcast to all columns and only column wr_col
//                loads it, so each column is clocked once every TB_LEN stages.
//   TB_SYSTOLIC  every column loads its neighbour's contents at each write:
//                the new vector enters column TB_LEN-1 and all older ones move
//                one column toward column 0.
// Cell structure, the zone A/B links, the zone B decode OR and both write
// schemes follow the modelled design; that the systolic newest column is the
// one the trace starts from is this design's reading of it.
//
// Assertions check that sel_row and every column's token vector are one-hot
// or zero.
//
// Timing: decode is combinational in sel_row and the stored bits (a path of
// TB_LEN cells). Writes take effect on the rising edge with wr_en high.
module tb_memory
  import vit_pkg::*;
#(
  parameter int       TB_LEN_P = TB_LEN,
  parameter int       N        = NSTATES,
  parameter tb_arch_e ARCH     = TB_PARALLEL
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                wr_en,
  input  logic [COL_W-1:0]    wr_col,
  input  logic [N-1:0]        wr_data,
  input  logic [N-1:0]        sel_row,
  output logic [TB_LEN_P-1:0] decode
);

  localparam int HALF = N / 2;

  // per-column token and storage vectors
  logic [N-1:0] up_v  [TB_LEN_P];
  logic [N-1:0] lo_v  [TB_LEN_P];
  logic [N-1:0] sel_v [TB_LEN_P];
  logic [N-1:0] q_v   [TB_LEN_P];

  for (genvar k = 0; k < TB_LEN_P; k++) begin : g_col
    logic         col_we;
    logic [N-1:0] col_data;
    logic [N-1:0] a_in, b_in;

    if (ARCH == TB_PARALLEL) begin : g_par
      assign col_we   = wr_en && (wr_col == COL_W'(k));
      assign col_data = wr_data;
    end else begin : g_sys
      assign col_we = wr_en;
      if (k == TB_LEN_P - 1) begin : g_head
        assign col_data = wr_data;
      end else begin : g_body
        assign col_data = q_v[k+1];
      end
    end

    for (genvar s = 0; s < N; s++) begin : g_row
      if (k == TB_LEN_P - 1) begin : g_inject
        assign a_in[s] = sel_row[s];
        assign b_in[s] = sel_row[s];
      end else if (s % 2 == 0) begin : g_even
        assign a_in[s] = up_v[k+1][s/2];
        assign b_in[s] = up_v[k+1][HALF + s/2];
      end else begin : g_odd
        assign a_in[s] = lo_v[k+1][s/2];
        assign b_in[s] = lo_v[k+1][HALF + s/2];
      end

      tb_cell u_cell (
        .clk  (clk),
        .rst_n(rst_n),
        .we   (col_we),
        .data (col_data[s]),
        .a    (a_in[s]),
        .b    (b_in[s]),
        .up   (up_v[k][s]),
        .lo   (lo_v[k][s]),
        .sel  (sel_v[k][s]),
        .q    (q_v[k][s])
      );
    end

    assign decode[k] = |sel_v[k][N-1:HALF];

    // at most one token per column: the survivor path visits one state per stage
    a_one_token: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(sel_v[k]));
  end

  a_one_winner: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(sel_row));

endmodule
