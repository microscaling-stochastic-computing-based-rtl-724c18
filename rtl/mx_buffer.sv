// Operand buffer (row buffer or column buffer) of the MX-SC array.
//
// Holds, for each of N lanes (array rows or array columns), one MX block:
// up to DEPTH 6-bit sign-magnitude mantissas, the block's 8-bit exponent and
// its 8-bit scale factor. The host writes one mantissa per cycle, or the
// exponent and scale of one lane; the sequencer reads the element at index
// rd_idx of every lane at once and feeds the lanes' SNGs.
// That each row and column carries mantissas with one exponent and one scale
// follows the architecture; the depth, the write port and the combinational
// read are this design's choices.
//
// Timing: writes take effect at the clock edge; reads are combinational.
module mx_buffer
  import mxsc_pkg::*;
#(
  parameter int unsigned N     = 32,
  parameter int unsigned DEPTH = 32,
  localparam int unsigned LW   = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned IW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic                    clk,
  input  logic                    wr_en,
  input  logic [LW-1:0]           wr_lane,
  input  logic [IW-1:0]           wr_idx,
  input  logic [MANT_W-1:0]       wr_mant,
  input  logic                    hdr_en,
  input  logic signed [EXP_W-1:0] wr_exp,
  input  logic [SCALE_W-1:0]      wr_scale,
  input  logic [IW-1:0]           rd_idx,
  output logic [MANT_W-1:0]       rd_mant  [N],
  output logic signed [EXP_W-1:0] rd_exp   [N],
  output logic [SCALE_W-1:0]      rd_scale [N]
);

  logic [MANT_W-1:0]       mant_mem  [N][DEPTH];
  logic signed [EXP_W-1:0] exp_mem   [N];
  logic [SCALE_W-1:0]      scale_mem [N];

  always_ff @(posedge clk) begin
    if (wr_en)
      mant_mem[wr_lane][wr_idx] <= wr_mant;
    if (hdr_en) begin
      exp_mem[wr_lane]   <= wr_exp;
      scale_mem[wr_lane] <= wr_scale;
    end
  end

  always_comb begin
    for (int i = 0; i < N; i++) begin
      rd_mant[i]  = mant_mem[i][rd_idx];
      rd_exp[i]   = exp_mem[i];
      rd_scale[i] = scale_mem[i];
    end
  end

endmodule
