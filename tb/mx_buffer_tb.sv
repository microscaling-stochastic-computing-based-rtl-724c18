// Testbench for mx_buffer (N = 4, DEPTH = 32): fills every lane with random
// mantissas, exponents and scales, keeps a copy here, and checks the
// parallel read of every element index for all lanes; then overwrites some
// entries and checks again.
module mx_buffer_tb;
  import mxsc_pkg::*;
  localparam int unsigned N = 4;
  localparam int unsigned DEPTH = 32;

  logic clk = 1'b0;
  logic wr_en = 1'b0, hdr_en = 1'b0;
  logic [1:0] wr_lane;
  logic [4:0] wr_idx, rd_idx;
  logic [MANT_W-1:0] wr_mant;
  logic signed [EXP_W-1:0] wr_exp;
  logic [SCALE_W-1:0] wr_scale;
  logic [MANT_W-1:0] rd_mant [N];
  logic signed [EXP_W-1:0] rd_exp [N];
  logic [SCALE_W-1:0] rd_scale [N];
  int checks = 0, failures = 0;

  logic [MANT_W-1:0] m_ref [N][DEPTH];
  logic [EXP_W-1:0] e_ref [N];
  logic [SCALE_W-1:0] s_ref [N];

  always #5 clk = ~clk;

  mx_buffer #(.N(N), .DEPTH(DEPTH)) dut (.clk, .wr_en, .wr_lane, .wr_idx, .wr_mant, .hdr_en,
                                         .wr_exp, .wr_scale, .rd_idx, .rd_mant, .rd_exp, .rd_scale);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write_mant(input int l, input int i, input logic [MANT_W-1:0] m);
    wr_en = 1'b1; wr_lane = 2'(l); wr_idx = 5'(i); wr_mant = m;
    @(negedge clk);
    wr_en = 1'b0;
    m_ref[l][i] = m;
  endtask

  task automatic read_all();
    for (int i = 0; i < int'(DEPTH); i++) begin
      rd_idx = 5'(i);
      #1;
      for (int l = 0; l < int'(N); l++) begin
        check(rd_mant[l] == m_ref[l][i], $sformatf("lane %0d idx %0d", l, i));
        check(rd_exp[l] == e_ref[l] && rd_scale[l] == s_ref[l], $sformatf("lane %0d header", l));
      end
    end
    @(negedge clk);
  endtask

  initial begin
    rd_idx = '0;
    @(negedge clk);
    for (int l = 0; l < int'(N); l++) begin
      hdr_en = 1'b1; wr_lane = 2'(l);
      wr_exp = EXP_W'($urandom); wr_scale = SCALE_W'($urandom);
      e_ref[l] = wr_exp; s_ref[l] = wr_scale;
      @(negedge clk);
      hdr_en = 1'b0;
      for (int i = 0; i < int'(DEPTH); i++) write_mant(l, i, MANT_W'($urandom));
    end
    read_all();
    for (int t = 0; t < 40; t++) write_mant($urandom_range(0, N - 1), $urandom_range(0, DEPTH - 1), MANT_W'($urandom));
    read_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
