// End-to-end testbench of mxsc_top at its default size (32 x 32 array,
// P = 8, blocks of up to 32 elements). Stimulus and checks are in
// mxsc_top_driver; the localparams here only mirror the defaults.
module mxsc_top_full_tb;
  localparam int unsigned N = 32;
  localparam int unsigned P = 8;
  localparam int unsigned DEPTH = 32;
  import mxsc_pkg::*;
  localparam int unsigned LW = (N > 1) ? $clog2(N) : 1;
  localparam int unsigned IW = $clog2(DEPTH);
  localparam int unsigned KW = $clog2(DEPTH + 1);
  logic a_wr_en, a_hdr_en, b_wr_en, b_hdr_en, start, busy, done, rd_ovf, finished;
  logic [LW-1:0] a_wr_lane, b_wr_lane, rd_row;
  logic [IW-1:0] a_wr_idx, b_wr_idx;
  logic [MANT_W-1:0] a_wr_mant, b_wr_mant;
  logic signed [EXP_W-1:0] a_wr_exp, b_wr_exp, rd_exp;
  logic [SCALE_W-1:0] a_wr_scale, b_wr_scale, rd_scale;
  logic [KW-1:0] k_len;
  logic [MANT_W-1:0] rd_mant [N];
  int checks, failures;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  mxsc_top dut (
    .clk, .rst_n, .a_wr_en, .a_wr_lane, .a_wr_idx, .a_wr_mant, .a_hdr_en, .a_wr_exp, .a_wr_scale, .b_wr_en, .b_wr_lane, .b_wr_idx, .b_wr_mant, .b_hdr_en, .b_wr_exp, .b_wr_scale, .start, .k_len, .busy, .done, .rd_row, .rd_mant, .rd_scale, .rd_exp, .rd_ovf
  );

  mxsc_top_driver #(.N(N), .P(P), .DEPTH(DEPTH)) u_drv (
    .clk, .rst_n, .a_wr_en, .a_wr_lane, .a_wr_idx, .a_wr_mant, .a_hdr_en, .a_wr_exp, .a_wr_scale, .b_wr_en, .b_wr_lane, .b_wr_idx, .b_wr_mant, .b_hdr_en, .b_wr_exp, .b_wr_scale, .start, .k_len, .busy, .done, .rd_row, .rd_mant, .rd_scale, .rd_exp, .rd_ovf,
    .checks, .failures, .finished
  );

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    wait (finished);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
