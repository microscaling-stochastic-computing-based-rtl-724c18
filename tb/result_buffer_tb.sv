// Testbench for result_buffer (N = 4): writes random blocks to every row in
// random order, keeps a copy here, and reads every row back.
module result_buffer_tb;
  import mxsc_pkg::*;
  localparam int unsigned N = 4;

  logic clk = 1'b0;
  logic wr_en = 1'b0, wr_ovf, rd_ovf;
  logic [1:0] wr_row, rd_row;
  logic [MANT_W-1:0] wr_mant [N], rd_mant [N];
  logic [SCALE_W-1:0] wr_scale, rd_scale;
  logic signed [EXP_W-1:0] wr_exp, rd_exp;
  int checks = 0, failures = 0;

  logic [MANT_W-1:0] m_ref [N][N];
  logic [SCALE_W-1:0] s_ref [N];
  logic [EXP_W-1:0] e_ref [N];
  logic o_ref [N];

  always #5 clk = ~clk;

  result_buffer #(.N(N)) dut (.clk, .wr_en, .wr_row, .wr_mant, .wr_scale, .wr_exp, .wr_ovf,
                              .rd_row, .rd_mant, .rd_scale, .rd_exp, .rd_ovf);

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

  initial begin
    rd_row = '0;
    @(negedge clk);
    for (int pass = 0; pass < 5; pass++) begin
      for (int t = 0; t < int'(N); t++) begin
        int r;
        r = (pass == 0) ? (int'(N) - 1 - t) : $urandom_range(0, N - 1);
        wr_en = 1'b1; wr_row = 2'(r);
        for (int j = 0; j < int'(N); j++) begin
          wr_mant[j] = MANT_W'($urandom);
          m_ref[r][j] = wr_mant[j];
        end
        wr_scale = SCALE_W'($urandom); wr_exp = EXP_W'($urandom); wr_ovf = 1'($urandom);
        s_ref[r] = wr_scale; e_ref[r] = wr_exp; o_ref[r] = wr_ovf;
        @(negedge clk);
        wr_en = 1'b0;
      end
      for (int r = 0; r < int'(N); r++) begin
        rd_row = 2'(r);
        #1;
        for (int j = 0; j < int'(N); j++)
          check(rd_mant[j] == m_ref[r][j], $sformatf("row %0d col %0d", r, j));
        check(rd_scale == s_ref[r] && rd_exp == e_ref[r] && rd_ovf == o_ref[r], "header");
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
