// Testbench of mxsc_top over the parallelisation factors P = 1, 2, 4, 16
// and 32 (the default P = 8 is covered by the other end-to-end tests), each
// on a 4 x 4 array with blocks of up to 32 elements. Every configuration
// runs the operations of mxsc_top_driver; the check counts are summed. The
// driver also checks that one operation takes k*32/P + 3N + 3 cycles.
module mxsc_top_psweep_tb;
  import mxsc_pkg::*;
  localparam int unsigned N = 4;
  localparam int unsigned DEPTH = 32;
  localparam int unsigned NP = 5;
  localparam int unsigned PS [NP] = '{1, 2, 4, 16, 32};
  localparam int unsigned LW = $clog2(N);
  localparam int unsigned IW = $clog2(DEPTH);
  localparam int unsigned KW = $clog2(DEPTH + 1);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic a_wr_en [NP], a_hdr_en [NP], b_wr_en [NP], b_hdr_en [NP], start [NP], busy [NP];
  logic done [NP], rd_ovf [NP], finished [NP];
  logic [LW-1:0] a_wr_lane [NP], b_wr_lane [NP], rd_row [NP];
  logic [IW-1:0] a_wr_idx [NP], b_wr_idx [NP];
  logic [MANT_W-1:0] a_wr_mant [NP], b_wr_mant [NP];
  logic signed [EXP_W-1:0] a_wr_exp [NP], b_wr_exp [NP], rd_exp [NP];
  logic [SCALE_W-1:0] a_wr_scale [NP], b_wr_scale [NP], rd_scale [NP];
  logic [KW-1:0] k_len [NP];
  logic [MANT_W-1:0] rd_mant [NP][N];
  int checks [NP], failures [NP];

  for (genvar g = 0; g < NP; g++) begin : g_cfg
    mxsc_top #(.N(N), .P(PS[g]), .DEPTH(DEPTH)) dut (
      .clk, .rst_n, .a_wr_en(a_wr_en[g]), .a_wr_lane(a_wr_lane[g]), .a_wr_idx(a_wr_idx[g]), .a_wr_mant(a_wr_mant[g]), .a_hdr_en(a_hdr_en[g]), .a_wr_exp(a_wr_exp[g]), .a_wr_scale(a_wr_scale[g]), .b_wr_en(b_wr_en[g]), .b_wr_lane(b_wr_lane[g]), .b_wr_idx(b_wr_idx[g]), .b_wr_mant(b_wr_mant[g]), .b_hdr_en(b_hdr_en[g]), .b_wr_exp(b_wr_exp[g]), .b_wr_scale(b_wr_scale[g]), .start(start[g]), .k_len(k_len[g]), .busy(busy[g]), .done(done[g]), .rd_row(rd_row[g]), .rd_mant(rd_mant[g]), .rd_scale(rd_scale[g]), .rd_exp(rd_exp[g]), .rd_ovf(rd_ovf[g])
    );
    mxsc_top_driver #(.N(N), .P(PS[g]), .DEPTH(DEPTH)) u_drv (
      .clk, .rst_n, .a_wr_en(a_wr_en[g]), .a_wr_lane(a_wr_lane[g]), .a_wr_idx(a_wr_idx[g]), .a_wr_mant(a_wr_mant[g]), .a_hdr_en(a_hdr_en[g]), .a_wr_exp(a_wr_exp[g]), .a_wr_scale(a_wr_scale[g]), .b_wr_en(b_wr_en[g]), .b_wr_lane(b_wr_lane[g]), .b_wr_idx(b_wr_idx[g]), .b_wr_mant(b_wr_mant[g]), .b_hdr_en(b_hdr_en[g]), .b_wr_exp(b_wr_exp[g]), .b_wr_scale(b_wr_scale[g]), .start(start[g]), .k_len(k_len[g]), .busy(busy[g]), .done(done[g]), .rd_row(rd_row[g]), .rd_mant(rd_mant[g]), .rd_scale(rd_scale[g]), .rd_exp(rd_exp[g]), .rd_ovf(rd_ovf[g]),
      .checks(checks[g]), .failures(failures[g]), .finished(finished[g])
    );
  end

  function automatic int total(input int v [NP]);
    int s = 0;
    for (int g = 0; g < NP; g++) s += v[g];
    return s;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int g = 0; g < NP; g++) wait (finished[g]);
    $display("TB_RESULT checks=%0d failures=%0d", total(checks), total(failures));
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", total(checks), total(failures) + 1);
    $finish;
  end
endmodule
