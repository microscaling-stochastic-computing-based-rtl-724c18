// N x N stochastic-computing systolic array with shared SNGs.
//
// One SNG sits at the left end of every row and one at the top of every
// column; all PEs of a row share the row SNG's bitstream and all PEs of a
// column share the column SNG's bitstream, which amortises the random number
// generation over N PEs. Streams move one PE per cycle to the right (row
// operands) and downwards (column operands); the array is output stationary:
// PE (i,j) accumulates the dot product of row operand i and column operand j.
// Results leave through the per-PE drain registers, which shift down the
// columns so that the bottom row feeds the Format Converter one result row
// per cycle, the bottom array row first.
// The edge SNGs, the PE grid and the downward path to the Format Converter
// follow the architecture; the seed assignment is this design's.
//
// Interface and timing: the caller must skew the inputs, presenting row i and
// column j delayed by i and j cycles, so that matching elements meet in every
// PE. pe_done is the `done` of the bottom-right PE, the last one to finish.
// After pe_done, one drain_load followed by N-1 drain_shift pulses moves all
// rows to res_bottom (row N-1 one cycle after drain_load, then row N-2, ...).
module pe_array
  import mxsc_pkg::*;
#(
  parameter int unsigned N = 32,
  parameter int unsigned P = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  mx_side_t         row_side [N],
  input  logic [MAG_W-1:0] row_mag  [N],
  input  mx_side_t         col_side [N],
  input  logic [MAG_W-1:0] col_mag  [N],
  input  logic             drain_load,
  input  logic             drain_shift,
  output logic             pe_done,
  output pe_res_t          res_bottom [N]
);

  // h_*[i][j]: row stream entering PE (i,j) from the left (j = N: leaving).
  // v_*[i][j]: column stream entering PE (i,j) from above (i = N: leaving).
  mx_side_t     h_side [N][N+1];
  logic [P-1:0] h_bits [N][N+1];
  mx_side_t     v_side [N+1][N];
  logic [P-1:0] v_bits [N+1][N];
  pe_res_t      res    [N][N];
  logic         done   [N][N];

  for (genvar i = 0; i < N; i++) begin : g_row_sng
    sng #(.P(P), .SEED_BASE(i + 1)) u_sng (
      .clk, .rst_n,
      .in_side(row_side[i]), .in_mag(row_mag[i]),
      .out_side(h_side[i][0]), .out_bits(h_bits[i][0])
    );
  end

  for (genvar j = 0; j < N; j++) begin : g_col_sng
    sng #(.P(P), .SEED_BASE(N + j + 1)) u_sng (
      .clk, .rst_n,
      .in_side(col_side[j]), .in_mag(col_mag[j]),
      .out_side(v_side[0][j]), .out_bits(v_bits[0][j])
    );
  end

  for (genvar i = 0; i < N; i++) begin : g_r
    for (genvar j = 0; j < N; j++) begin : g_c
      pe_res_t res_above;
      if (i == 0) begin : g_top
        assign res_above = '0;
      end else begin : g_inner
        assign res_above = res[i-1][j];
      end
      pe #(.P(P)) u_pe (
        .clk, .rst_n,
        .w_side(h_side[i][j]),   .w_bits(h_bits[i][j]),
        .e_side(h_side[i][j+1]), .e_bits(h_bits[i][j+1]),
        .n_side(v_side[i][j]),   .n_bits(v_bits[i][j]),
        .s_side(v_side[i+1][j]), .s_bits(v_bits[i+1][j]),
        .drain_load, .drain_shift,
        .res_in(res_above), .res_out(res[i][j]),
        .done(done[i][j])
      );
    end
  end

  for (genvar j = 0; j < N; j++) begin : g_out
    assign res_bottom[j] = res[N-1][j];
  end

  assign pe_done = done[N-1][N-1];

endmodule
