// Testbench for pe_array (4 x 4, P = 8): feeds skewed blocks of random MX
// mantissas, records the bits the edge SNGs emit, and computes from them
// what every PE must accumulate given the systolic timing (row stream one
// PE per cycle to the right, column stream one PE per cycle down). The
// drained results must match exactly, pe_done must rise 2N-1 cycles after the
// row-0 SNG shows the last stream cycle, rows must leave bottom row first, and each
// accumulator must also be within a statistical bound of the exact
// mantissa dot product.
module pe_array_tb;
  import mxsc_pkg::*;
  localparam int unsigned N = 4;
  localparam int unsigned P = 8;
  localparam int unsigned C = SC_L / P;
  localparam int TMAX = 4096;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  mx_side_t row_side [N], col_side [N];
  logic [MAG_W-1:0] row_mag [N], col_mag [N];
  logic drain_load = 1'b0, drain_shift = 1'b0, pe_done;
  pe_res_t res_bottom [N];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  pe_array #(.N(N), .P(P)) dut (.clk, .rst_n, .row_side, .row_mag, .col_side, .col_mag,
                                .drain_load, .drain_shift, .pe_done, .res_bottom);

  // edge SNG outputs recorded per cycle
  mx_side_t     rh_side [N][TMAX], ch_side [N][TMAX];
  logic [P-1:0] rh_bits [N][TMAX], ch_bits [N][TMAX];
  int cyc = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one negedge per cycle: record what the SNGs show in this cycle
  task automatic next_cycle();
    @(negedge clk);
    cyc++;
    for (int i = 0; i < int'(N); i++) begin
      rh_side[i][cyc] = dut.h_side[i][0];
      rh_bits[i][cyc] = dut.h_bits[i][0];
      ch_side[i][cyc] = dut.v_side[0][i];
      ch_bits[i][cyc] = dut.v_bits[0][i];
    end
  endtask

  initial begin
    for (int i = 0; i < int'(N); i++) begin
      row_side[i] = '0; col_side[i] = '0; row_mag[i] = '0; col_mag[i] = '0;
    end
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int blk = 0; blk < 3; blk++) begin
      int k, t0, t_fin, t_done, slen;
      logic [MANT_W-1:0] am [N][32], bm [N][32];
      logic signed [EXP_W-1:0] ae [N], be [N];
      logic [SCALE_W-1:0] as_ [N], bs [N];
      int acc_ref [N][N];
      int dot [N][N];
      k = (blk == 0) ? 32 : $urandom_range(1, 32);
      slen = k * int'(C);
      for (int i = 0; i < int'(N); i++) begin
        ae[i] = EXP_W'($urandom_range(0, 40)) - 8'sd20; be[i] = EXP_W'($urandom_range(0, 40)) - 8'sd20;
        as_[i] = 8'($urandom_range(1, 255)); bs[i] = 8'($urandom_range(1, 255));
        for (int e = 0; e < k; e++) begin
          am[i][e] = MANT_W'($urandom);
          bm[i][e] = MANT_W'($urandom);
          if (blk == 0) begin am[i][e][5] = 1'b0; bm[i][e][5] = (i == 1); end
        end
      end
      // drive the skewed streams: unskewed cycle u goes to lane i at u + i
      t0 = cyc + 1;
      for (int u = 0; u < slen + int'(N); u++) begin
        for (int i = 0; i < int'(N); i++) begin
          int s;
          s = u - i;
          if (s >= 0 && s < slen) begin
            int e, c;
            e = s / int'(C); c = s % int'(C);
            row_side[i] = '{vld: 1'b1, clr: (s == 0), fin: (s == slen - 1), sign: am[i][e][5],
                            exp: ae[i], scale: as_[i]};
            col_side[i] = '{vld: 1'b1, clr: (s == 0), fin: (s == slen - 1), sign: bm[i][e][5],
                            exp: be[i], scale: bs[i]};
            row_mag[i] = am[i][e][4:0];
            col_mag[i] = bm[i][e][4:0];
          end else begin
            row_side[i] = '0; col_side[i] = '0;
            row_mag[i] = MAG_W'($urandom); col_mag[i] = MAG_W'($urandom);
          end
        end
        next_cycle();
      end
      t_fin = t0 + slen - 1;   // cycle in which SNG 0 shows the last stream cycle
      t_done = 0;
      for (int w = 0; w < 200 && t_done == 0; w++) begin
        if (pe_done) t_done = cyc;
        else next_cycle();
      end
      check(t_done - t_fin == 2 * int'(N) - 1, $sformatf("pe_done after %0d cycles, expected %0d",
            t_done - t_fin, 2 * N - 1));
      // reference: PE (i,j) in cycle T sees row SNG i of cycle T-j and
      // column SNG j of cycle T-i
      for (int i = 0; i < int'(N); i++)
        for (int j = 0; j < int'(N); j++) begin
          acc_ref[i][j] = 0;
          for (int T = t0; T <= t_done; T++) begin
            mx_side_t rs, cs;
            int cnt;
            rs = rh_side[i][T - j];
            cs = ch_side[j][T - i];
            cnt = $countones(rh_bits[i][T - j] & ch_bits[j][T - i]);
            if (rs.vld) begin
              if (rs.sign ^ cs.sign) cnt = -cnt;
              acc_ref[i][j] = rs.clr ? cnt : acc_ref[i][j] + cnt;
            end
          end
          dot[i][j] = 0;
          for (int e = 0; e < k; e++)
            dot[i][j] += (am[i][e][5] ^ bm[j][e][5] ? -1 : 1) * int'(am[i][e][4:0]) * int'(bm[j][e][4:0]);
        end
      // drain
      drain_load = 1'b1;
      next_cycle();
      drain_load = 1'b0;
      for (int r = int'(N) - 1; r >= 0; r--) begin
        for (int j = 0; j < int'(N); j++) begin
          real est, tol;
          check(int'(res_bottom[j].acc) == acc_ref[r][j],
                $sformatf("blk %0d PE(%0d,%0d) acc %0d vs %0d", blk, r, j, res_bottom[j].acc, acc_ref[r][j]));
          check(int'(res_bottom[j].esum) == int'(ae[r]) + int'(be[j]), "esum");
          check(int'(res_bottom[j].sprod) == int'(as_[r]) * int'(bs[j]), "sprod");
          est = real'(dot[r][j]) / 32.0;
          tol = 6.0 * $sqrt(real'(k) * 8.0) + 2.0;
          check((real'(res_bottom[j].acc) - est) < tol && (est - real'(res_bottom[j].acc)) < tol,
                $sformatf("PE(%0d,%0d) acc %0d far from %f", r, j, res_bottom[j].acc, est));
        end
        drain_shift = 1'b1;
        next_cycle();
        drain_shift = 1'b0;
      end
      repeat (3) next_cycle();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
