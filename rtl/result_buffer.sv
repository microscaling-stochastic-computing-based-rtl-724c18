// Result buffer of the MX-SC array.
//
// Stores the MX blocks produced by the Format Converter, one per array row:
// N 6-bit sign-magnitude mantissas, the shared 8-bit scale, the shared 8-bit
// exponent and an overflow flag. The host reads one row at a time.
// Only the existence of a result buffer is given by the architecture; its
// organisation (one entry per result row, combinational read) is this
// design's choice.
//
// Timing: a write takes effect at the clock edge; reads are combinational.
module result_buffer
  import mxsc_pkg::*;
#(
  parameter int unsigned N  = 32,
  localparam int unsigned LW = (N > 1) ? $clog2(N) : 1
) (
  input  logic                    clk,
  input  logic                    wr_en,
  input  logic [LW-1:0]           wr_row,
  input  logic [MANT_W-1:0]       wr_mant [N],
  input  logic [SCALE_W-1:0]      wr_scale,
  input  logic signed [EXP_W-1:0] wr_exp,
  input  logic                    wr_ovf,
  input  logic [LW-1:0]           rd_row,
  output logic [MANT_W-1:0]       rd_mant [N],
  output logic [SCALE_W-1:0]      rd_scale,
  output logic signed [EXP_W-1:0] rd_exp,
  output logic                    rd_ovf
);

  logic [MANT_W-1:0]       mant_mem  [N][N];
  logic [SCALE_W-1:0]      scale_mem [N];
  logic signed [EXP_W-1:0] exp_mem   [N];
  logic                    ovf_mem   [N];

  always_ff @(posedge clk) begin
    if (wr_en) begin
      for (int j = 0; j < N; j++) mant_mem[wr_row][j] <= wr_mant[j];
      scale_mem[wr_row] <= wr_scale;
      exp_mem[wr_row]   <= wr_exp;
      ovf_mem[wr_row]   <= wr_ovf;
    end
  end

  always_comb begin
    for (int j = 0; j < N; j++) rd_mant[j] = mant_mem[rd_row][j];
    rd_scale = scale_mem[rd_row];
    rd_exp   = exp_mem[rd_row];
    rd_ovf   = ovf_mem[rd_row];
  end

endmodule
