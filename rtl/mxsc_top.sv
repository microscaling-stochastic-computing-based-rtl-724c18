// MX-SC systolic array accelerator: microscaling (MX) storage with
// stochastic-computing (SC) mantissa arithmetic.
//
// Operands are MX blocks: 6-bit sign-magnitude mantissas sharing an 8-bit
// exponent and an 8-bit linear scale. The row buffer holds N row blocks
// A_0..A_{N-1} and the column buffer N column blocks B_0..B_{N-1}, each of
// k_len <= DEPTH elements. One operation computes all N x N dot products
// C[i][j] = A_i . B_j:
//   - the sequencer reads element k of every lane and holds it for L/P
//     cycles; the lanes are skewed (row i and column j by i and j cycles);
//   - one SNG per row and per column turns the 5-bit magnitudes into P
//     stochastic bits per cycle (bitstream length L = 32);
//   - every PE multiplies with P AND gates, counts the ones, applies the sign
//     and accumulates, and forms exponent sum and scale product in binary;
//   - the results drain row by row through the Format Converter, which gives
//     each result row a shared exponent and scale, into the result buffer.
// The dataflow (buffers, shared edge SNGs, PE grid, Format Converter, result
// buffer) follows the architecture; the host ports, the skew and the
// sequencer are this design's.
//
// Host interface: a_* / b_* write the row / column buffer (one mantissa per
// cycle, or one lane's exponent and scale). Pulse start with k_len while
// busy is low; done pulses when all N result rows are in the result buffer,
// k_len*L/P + 3N + 3 cycles after start. rd_row selects a result row; rd_*
// return its N mantissas (column j = C[rd_row][j]), scale, exponent and the
// exponent overflow flag, combinationally.
module mxsc_top
  import mxsc_pkg::*;
#(
  parameter int unsigned N     = 32,
  parameter int unsigned P     = 8,
  parameter int unsigned DEPTH = 32,
  localparam int unsigned LW   = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned IW   = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned KW   = $clog2(DEPTH + 1)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // row buffer write port
  input  logic                    a_wr_en,
  input  logic [LW-1:0]           a_wr_lane,
  input  logic [IW-1:0]           a_wr_idx,
  input  logic [MANT_W-1:0]       a_wr_mant,
  input  logic                    a_hdr_en,
  input  logic signed [EXP_W-1:0] a_wr_exp,
  input  logic [SCALE_W-1:0]      a_wr_scale,
  // column buffer write port
  input  logic                    b_wr_en,
  input  logic [LW-1:0]           b_wr_lane,
  input  logic [IW-1:0]           b_wr_idx,
  input  logic [MANT_W-1:0]       b_wr_mant,
  input  logic                    b_hdr_en,
  input  logic signed [EXP_W-1:0] b_wr_exp,
  input  logic [SCALE_W-1:0]      b_wr_scale,
  // operation control
  input  logic                    start,
  input  logic [KW-1:0]           k_len,
  output logic                    busy,
  output logic                    done,
  // result read port
  input  logic [LW-1:0]           rd_row,
  output logic [MANT_W-1:0]       rd_mant [N],
  output logic [SCALE_W-1:0]      rd_scale,
  output logic signed [EXP_W-1:0] rd_exp,
  output logic                    rd_ovf
);

  localparam int unsigned SW = $bits(mx_side_t) + MAG_W;

  logic [IW-1:0]           rd_idx;
  logic                    s_vld, s_clr, s_fin;
  logic                    drain_load, drain_shift, conv_valid, pe_done;
  logic [LW-1:0]           conv_row, conv_row_q;

  logic [MANT_W-1:0]       a_mant [N], b_mant [N];
  logic signed [EXP_W-1:0] a_exp  [N], b_exp  [N];
  logic [SCALE_W-1:0]      a_scl  [N], b_scl  [N];

  mx_side_t                row_side [N], col_side [N];
  logic [MAG_W-1:0]        row_mag  [N], col_mag  [N];
  pe_res_t                 res_bottom [N];

  logic                    cv_valid, cv_ovf;
  logic [MANT_W-1:0]       cv_mant [N];
  logic [SCALE_W-1:0]      cv_scale;
  logic signed [EXP_W-1:0] cv_exp;

  mxsc_ctrl #(.N(N), .P(P), .L(SC_L), .DEPTH(DEPTH)) u_ctrl (
    .clk, .rst_n, .start, .k_len, .pe_done, .busy, .done,
    .rd_idx, .s_vld, .s_clr, .s_fin,
    .drain_load, .drain_shift, .conv_valid, .conv_row
  );

  mx_buffer #(.N(N), .DEPTH(DEPTH)) u_row_buf (
    .clk, .wr_en(a_wr_en), .wr_lane(a_wr_lane), .wr_idx(a_wr_idx),
    .wr_mant(a_wr_mant), .hdr_en(a_hdr_en), .wr_exp(a_wr_exp),
    .wr_scale(a_wr_scale), .rd_idx,
    .rd_mant(a_mant), .rd_exp(a_exp), .rd_scale(a_scl)
  );

  mx_buffer #(.N(N), .DEPTH(DEPTH)) u_col_buf (
    .clk, .wr_en(b_wr_en), .wr_lane(b_wr_lane), .wr_idx(b_wr_idx),
    .wr_mant(b_wr_mant), .hdr_en(b_hdr_en), .wr_exp(b_wr_exp),
    .wr_scale(b_wr_scale), .rd_idx,
    .rd_mant(b_mant), .rd_exp(b_exp), .rd_scale(b_scl)
  );

  // Skew: lane i of either buffer is delayed by i cycles.
  for (genvar i = 0; i < N; i++) begin : g_skew
    mx_side_t      a_side, b_side;
    logic [SW-1:0] a_d, b_d, a_q, b_q;
    assign a_side = '{vld: s_vld, clr: s_clr, fin: s_fin, sign: a_mant[i][MANT_W-1],
                      exp: a_exp[i], scale: a_scl[i]};
    assign b_side = '{vld: s_vld, clr: s_clr, fin: s_fin, sign: b_mant[i][MANT_W-1],
                      exp: b_exp[i], scale: b_scl[i]};
    assign a_d = {a_side, a_mant[i][MAG_W-1:0]};
    assign b_d = {b_side, b_mant[i][MAG_W-1:0]};
    skew_line #(.W(SW), .DELAY(i)) u_row_skew (.clk, .rst_n, .d(a_d), .q(a_q));
    skew_line #(.W(SW), .DELAY(i)) u_col_skew (.clk, .rst_n, .d(b_d), .q(b_q));
    assign {row_side[i], row_mag[i]} = a_q;
    assign {col_side[i], col_mag[i]} = b_q;
  end

  pe_array #(.N(N), .P(P)) u_array (
    .clk, .rst_n, .row_side, .row_mag, .col_side, .col_mag,
    .drain_load, .drain_shift, .pe_done, .res_bottom
  );

  format_converter #(.N(N)) u_conv (
    .clk, .rst_n, .in_valid(conv_valid), .in_res(res_bottom),
    .out_valid(cv_valid), .out_mant(cv_mant), .out_scale(cv_scale),
    .out_exp(cv_exp), .out_ovf(cv_ovf)
  );

  // The converter has one cycle of latency; the row index follows it.
  always_ff @(posedge clk) begin
    if (!rst_n) conv_row_q <= '0;
    else        conv_row_q <= conv_row;
  end

  result_buffer #(.N(N)) u_res_buf (
    .clk, .wr_en(cv_valid), .wr_row(conv_row_q), .wr_mant(cv_mant),
    .wr_scale(cv_scale), .wr_exp(cv_exp), .wr_ovf(cv_ovf),
    .rd_row, .rd_mant, .rd_scale, .rd_exp, .rd_ovf
  );

endmodule
