// Stimulus and checking for one mxsc_top instance, used by the end-to-end
// testbenches. It drives the host ports of the DUT it is connected to and
// reports its check and failure counts and when it has finished.
//
// Each operation writes N random row blocks and N random column blocks
// through the host ports, starts the array, checks that done arrives after
// exactly k*L/P + 3N + 3 cycles, reads back all N result rows and compares
// every element with the exact real-valued dot product of the two MX
// blocks. The allowed error is a statistical bound on the stochastic
// multiplication (6 standard deviations of the count, from the product
// probabilities of the operands) plus the rounding of the output format.
// Mechanisms counted (each must occur): negative products (sign handling),
// exponent alignment across a result row, a shared output scale above 1,
// exponent overflow saturation and underflow flushing.
module mxsc_top_driver
  import mxsc_pkg::*;
#(
  parameter int unsigned N     = 4,
  parameter int unsigned P     = 8,
  parameter int unsigned DEPTH = 32,
  localparam int unsigned LW   = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned IW   = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned KW   = $clog2(DEPTH + 1)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  output logic                    a_wr_en,
  output logic [LW-1:0]           a_wr_lane,
  output logic [IW-1:0]           a_wr_idx,
  output logic [MANT_W-1:0]       a_wr_mant,
  output logic                    a_hdr_en,
  output logic signed [EXP_W-1:0] a_wr_exp,
  output logic [SCALE_W-1:0]      a_wr_scale,
  output logic                    b_wr_en,
  output logic [LW-1:0]           b_wr_lane,
  output logic [IW-1:0]           b_wr_idx,
  output logic [MANT_W-1:0]       b_wr_mant,
  output logic                    b_hdr_en,
  output logic signed [EXP_W-1:0] b_wr_exp,
  output logic [SCALE_W-1:0]      b_wr_scale,
  output logic                    start,
  output logic [KW-1:0]           k_len,
  input  logic                    busy,
  input  logic                    done,
  output logic [LW-1:0]           rd_row,
  input  logic [MANT_W-1:0]       rd_mant [N],
  input  logic [SCALE_W-1:0]      rd_scale,
  input  logic signed [EXP_W-1:0] rd_exp,
  input  logic                    rd_ovf,
  output int                      checks,
  output int                      failures,
  output logic                    finished
);

  localparam int unsigned C = SC_L / P;

  int n_neg = 0, n_align = 0, n_scale = 0, n_ovf = 0, n_flush = 0, n_ops = 0;

  logic [MANT_W-1:0] am [N][DEPTH], bm [N][DEPTH];
  int ae [N], be [N], as_ [N], bs [N];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  // kind 0: random exponents around zero; 1: exponents near +127 (overflow);
  // 2: exponents near -128 (underflow)
  task automatic run_op(input int k, input int kind);
    int cyc;
    for (int i = 0; i < int'(N); i++) begin
      case (kind)
        1:       begin ae[i] = 120 + $urandom_range(0, 7); be[i] = 120 + $urandom_range(0, 7); end
        2:       begin ae[i] = -128; be[i] = -120; end
        default: begin ae[i] = $urandom_range(0, 24) - 12; be[i] = $urandom_range(0, 24) - 12; end
      endcase
      as_[i] = $urandom_range(1, 255);
      bs[i] = (i % 3 == 0) ? 1 : $urandom_range(1, 255);
      for (int e = 0; e < k; e++) begin
        am[i][e] = MANT_W'($urandom);
        bm[i][e] = MANT_W'($urandom);
        // row 0 and column 0 are all positive so that their dot products are large
        if (i == 0) begin am[i][e][5] = 1'b0; bm[i][e][5] = 1'b0; end
      end
    end
    // load the buffers
    for (int i = 0; i < int'(N); i++) begin
      a_hdr_en = 1'b1; b_hdr_en = 1'b1;
      a_wr_lane = LW'(i); b_wr_lane = LW'(i);
      a_wr_exp = EXP_W'(ae[i]); b_wr_exp = EXP_W'(be[i]);
      a_wr_scale = SCALE_W'(as_[i]); b_wr_scale = SCALE_W'(bs[i]);
      @(negedge clk);
      a_hdr_en = 1'b0; b_hdr_en = 1'b0;
      for (int e = 0; e < k; e++) begin
        a_wr_en = 1'b1; b_wr_en = 1'b1;
        a_wr_idx = IW'(e); b_wr_idx = IW'(e);
        a_wr_mant = am[i][e]; b_wr_mant = bm[i][e];
        @(negedge clk);
        a_wr_en = 1'b0; b_wr_en = 1'b0;
      end
    end
    // run
    start = 1'b1; k_len = KW'(k);
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!done && cyc < 100000) begin
      check(busy, "busy while running");
      @(negedge clk);
      cyc++;
    end
    check(cyc == k * int'(C) + 3 * int'(N) + 3,
          $sformatf("operation took %0d cycles, expected %0d", cyc, k * C + 3 * N + 3));
    n_ops++;
    // compare
    for (int i = 0; i < int'(N); i++) begin
      @(negedge clk);
      rd_row = LW'(i);
      #1;
      if (rd_scale > 1) n_scale++;
      for (int j = 1; j < int'(N); j++)
        if (ae[i] + be[j] != ae[i] + be[0]) begin n_align++; break; end
      if (rd_ovf) begin
        n_ovf++;
        check(rd_exp == 8'sd127, "saturated exponent");
        continue;
      end
      if (rd_exp == -8'sd128 && kind == 2) begin
        n_flush++;
        for (int j = 0; j < int'(N); j++) check(rd_mant[j] == '0, "flushed block");
        continue;
      end
      for (int j = 0; j < int'(N); j++) begin
        real exact, var_cnt, unit, recon, tol;
        exact = 0.0; var_cnt = 0.0;
        for (int e = 0; e < k; e++) begin
          real pa, pb, pr;
          pa = real'(am[i][e][4:0]) / 32.0;
          pb = real'(bm[j][e][4:0]) / 32.0;
          pr = pa * pb;
          if (am[i][e][5] ^ bm[j][e][5]) begin
            exact -= pr;
            if (pr > 0.0) n_neg++;
          end else begin
            exact += pr;
          end
          var_cnt += real'(SC_L) * pr * (1.0 - pr);
        end
        unit = real'(as_[i]) * real'(bs[j]) * (2.0 ** (ae[i] + be[j]));
        exact = exact * unit;
        recon = (rd_mant[j][5] ? -1.0 : 1.0) * real'(rd_mant[j][4:0]) / 32.0
                * real'(rd_scale) * (2.0 ** rd_exp);
        tol = (6.0 * $sqrt(var_cnt) + 2.0) / 32.0 * unit
              + (real'(rd_scale) / 2.0 + 2.0) / 32.0 * (2.0 ** rd_exp);
        check((exact - recon) <= tol && (recon - exact) <= tol,
              $sformatf("C[%0d][%0d] = %g, exact %g, tolerance %g", i, j, recon, exact, tol));
      end
    end
    @(negedge clk);
  endtask

  initial begin
    checks = 0; failures = 0; finished = 1'b0;
    a_wr_en = 1'b0; a_hdr_en = 1'b0; b_wr_en = 1'b0; b_hdr_en = 1'b0;
    start = 1'b0; k_len = '0; rd_row = '0;
    @(posedge rst_n);
    @(negedge clk);
    check(!busy && !done, "idle after reset");
    run_op(int'(DEPTH), 0);
    run_op(7, 0);
    run_op(int'(DEPTH), 1);
    run_op(3, 2);
    $display("N=%0d P=%0d: operations %0d, negative products %0d, aligned rows %0d, scale > 1 %0d, overflow %0d, flushed %0d",
             N, P, n_ops, n_neg, n_align, n_scale, n_ovf, n_flush);
    check(n_neg > 0, "negative products occurred");
    check(n_align > 0, "exponent alignment occurred");
    check(n_scale > 0, "output scale above 1 occurred");
    check(n_ovf > 0, "exponent overflow occurred");
    check(n_flush > 0, "underflow flush occurred");
    finished = 1'b1;
  end

endmodule
