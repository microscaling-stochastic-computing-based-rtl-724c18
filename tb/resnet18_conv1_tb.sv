// Workload testbench: the first convolution of ResNet18 in its CIFAR form
// (3 input channels, 3x3 kernel, stride 1, padding 1, 64 output channels,
// 32 x 32 pixels) on the default 32 x 32 MX-SC array with P = 8.
//
// The reduction length 3*3*3 = 27 fits one MX block, so every output is one
// dot product of the array. The layer is mapped as a matrix product: an
// operation takes 32 output pixels (one image row) as the row blocks and 32
// filters as the column blocks; 32 image rows x 2 filter groups = 64
// operations. The image and the weights are synthetic (approximately
// normal, generated here). Each 27-element vector is quantised to MX with
// its own exponent (scale 1): m = round(|x| / 2^E * 32), 2^E >= max |x|.
//
// Checks: every output against the exact product of the quantised operands
// (statistical bound of the stochastic multiply plus output rounding), the
// cycle count of every operation, and the relative RMS error of the whole
// layer against the unquantised real-valued convolution, printed for the MX
// quantisation alone and for the array. With L = 32 each product count has a
// standard deviation of about sqrt(32 p (1-p)), which on this random data
// gives an output error of roughly 40 %; the bounds checked are 10 % for
// the quantisation and 60 % for the array (a wrong sign or scale gives more
// than 100 %). The array's error variance is also compared with that of
// ideal independent binomial streams, which exposes correlation between
// the row and column generators.
module resnet18_conv1_tb;
  import mxsc_pkg::*;
  localparam int unsigned N = 32;
  localparam int unsigned DEPTH = 32;
  localparam int unsigned P = 8;
  localparam int unsigned LW = 5;
  localparam int unsigned IW = 5;
  localparam int unsigned KW = 6;
  localparam int K = 27;
  localparam int H = 32;
  localparam int CO = 64;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic a_wr_en = 0, a_hdr_en = 0, b_wr_en = 0, b_hdr_en = 0, start = 0, busy, done, rd_ovf;
  logic [LW-1:0] a_wr_lane, b_wr_lane, rd_row;
  logic [IW-1:0] a_wr_idx, b_wr_idx;
  logic [MANT_W-1:0] a_wr_mant, b_wr_mant;
  logic signed [EXP_W-1:0] a_wr_exp, b_wr_exp, rd_exp;
  logic [SCALE_W-1:0] a_wr_scale, b_wr_scale, rd_scale;
  logic [KW-1:0] k_len;
  logic [MANT_W-1:0] rd_mant [N];

  mxsc_top dut (.*);

  int checks = 0, failures = 0;

  real img [3][H][H];
  real wgt [CO][K];
  // quantised operands of the current operation
  logic [MANT_W-1:0] am [N][K], bm [N][K];
  int ae [N], be [N];
  real err2 = 0.0, ref2 = 0.0, qerr2 = 0.0, scerr2 = 0.0, scvar = 0.0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  function automatic real gauss();
    real s = 0.0;
    for (int i = 0; i < 12; i++) s += real'($urandom_range(0, 65535)) / 65536.0;
    return s - 6.0;
  endfunction

  // MX quantisation of one vector with scale 1
  task automatic quantise(input real v [K], output logic [MANT_W-1:0] m [K], output int e);
    real amax = 0.0;
    foreach (v[i]) if ((v[i] < 0 ? -v[i] : v[i]) > amax) amax = (v[i] < 0 ? -v[i] : v[i]);
    e = -30;
    while ((2.0 ** e) < amax && e < 100) e++;
    for (int i = 0; i < K; i++) begin
      real a;
      int q;
      a = (v[i] < 0 ? -v[i] : v[i]) / (2.0 ** e) * 32.0;
      q = int'($floor(a + 0.5));
      if (q > 31) q = 31;
      m[i] = {v[i] < 0 && q != 0, 5'(q)};
    end
  endtask

  function automatic real patch(input int y, input int x, input int k);
    int c, dy, dx, yy, xx;
    c = k / 9; dy = (k % 9) / 3 - 1; dx = k % 3 - 1;
    yy = y + dy; xx = x + dx;
    if (yy < 0 || yy >= H || xx < 0 || xx >= H) return 0.0;
    return img[c][yy][xx];
  endfunction

  initial begin
    repeat (2000000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int c = 0; c < 3; c++)
      for (int y = 0; y < H; y++)
        for (int x = 0; x < H; x++) img[c][y][x] = gauss();
    for (int o = 0; o < CO; o++)
      for (int k = 0; k < K; k++) wgt[o][k] = gauss() * 0.2;
    k_len = KW'(K); rd_row = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int g = 0; g < CO / int'(N); g++) begin
      // filters of group g into the column buffer
      for (int j = 0; j < int'(N); j++) begin
        real v [K];
        for (int k = 0; k < K; k++) v[k] = wgt[g * N + j][k];
        quantise(v, bm[j], be[j]);
        b_hdr_en = 1; b_wr_lane = LW'(j); b_wr_exp = EXP_W'(be[j]); b_wr_scale = 8'd1;
        @(negedge clk);
        b_hdr_en = 0;
        for (int k = 0; k < K; k++) begin
          b_wr_en = 1; b_wr_idx = IW'(k); b_wr_mant = bm[j][k];
          @(negedge clk);
        end
        b_wr_en = 0;
      end
      for (int y = 0; y < H; y++) begin
        int cyc;
        // patches of image row y into the row buffer
        for (int i = 0; i < int'(N); i++) begin
          real v [K];
          for (int k = 0; k < K; k++) v[k] = patch(y, i, k);
          quantise(v, am[i], ae[i]);
          a_hdr_en = 1; a_wr_lane = LW'(i); a_wr_exp = EXP_W'(ae[i]); a_wr_scale = 8'd1;
          @(negedge clk);
          a_hdr_en = 0;
          for (int k = 0; k < K; k++) begin
            a_wr_en = 1; a_wr_idx = IW'(k); a_wr_mant = am[i][k];
            @(negedge clk);
          end
          a_wr_en = 0;
        end
        start = 1;
        @(negedge clk);
        start = 0;
        cyc = 1;
        while (!done && cyc < 10000) begin @(negedge clk); cyc++; end
        check(cyc == K * int'(SC_L / P) + 3 * int'(N) + 3, $sformatf("operation took %0d cycles", cyc));
        for (int i = 0; i < int'(N); i++) begin
          @(negedge clk);
          rd_row = LW'(i);
          #1;
          check(!rd_ovf, "no exponent overflow");
          for (int j = 0; j < int'(N); j++) begin
            real exact, fp, var_cnt, unit, recon, tol;
            exact = 0.0; var_cnt = 0.0; fp = 0.0;
            for (int k = 0; k < K; k++) begin
              real pr;
              pr = real'(am[i][k][4:0]) * real'(bm[j][k][4:0]) / 1024.0;
              exact += (am[i][k][5] ^ bm[j][k][5]) ? -pr : pr;
              var_cnt += real'(SC_L) * pr * (1.0 - pr);
              fp += patch(y, i, k) * wgt[g * N + j][k];
            end
            unit = 2.0 ** (ae[i] + be[j]);
            exact *= unit;
            recon = (rd_mant[j][5] ? -1.0 : 1.0) * real'(rd_mant[j][4:0]) / 32.0
                    * real'(rd_scale) * (2.0 ** rd_exp);
            tol = (6.0 * $sqrt(var_cnt) + 2.0) / 32.0 * unit
                  + (real'(rd_scale) / 2.0 + 2.0) / 32.0 * (2.0 ** rd_exp);
            check((exact - recon) <= tol && (recon - exact) <= tol,
                  $sformatf("out[%0d][%0d][%0d] = %g, exact %g", g * N + j, y, i, recon, exact));
            err2 += (recon - fp) * (recon - fp);
            qerr2 += (exact - fp) * (exact - fp);
            scerr2 += (recon - exact) * (recon - exact);
            scvar += var_cnt * (unit / 32.0) * (unit / 32.0);
            ref2 += fp * fp;
          end
        end
        @(negedge clk);
      end
    end
    $display("relative RMS error against the real-valued convolution: MX quantisation alone %f, MX-SC array %f",
             $sqrt(qerr2 / ref2), $sqrt(err2 / ref2));
    $display("array error variance / variance of independent binomial streams: %f", scerr2 / scvar);
    check($sqrt(qerr2 / ref2) < 0.1, "quantisation error below 10 %");
    check(scerr2 / scvar < 1.5, "no excess error from correlated streams");
    check($sqrt(err2 / ref2) < 0.6, "array error below 60 %");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
