// Testbench for format_converter (N = 4): random rows of PE results are
// converted and compared field by field with a reference computed here in
// 64-bit integers, and every converted element is also turned back into a
// real number and compared with the exact value of its PE result (the error
// may not exceed the truncation of the shifters plus half a quantisation
// step). Directed cases: all zero, equal exponents, exponent overflow and
// underflow, largest magnitudes.
module format_converter_tb;
  import mxsc_pkg::*;
  localparam int unsigned N = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0, out_valid, out_ovf;
  pe_res_t in_res [N];
  logic [MANT_W-1:0] out_mant [N];
  logic [SCALE_W-1:0] out_scale;
  logic signed [EXP_W-1:0] out_exp;
  int checks = 0, failures = 0;
  int n_align = 0, n_kshift = 0, n_ovf = 0, n_unf = 0;

  always #5 clk = ~clk;

  format_converter #(.N(N)) dut (.clk, .rst_n, .in_valid, .in_res, .out_valid, .out_mant,
                                 .out_scale, .out_exp, .out_ovf);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_case(input int acc [N], input int esum [N], input int sprod [N]);
    longint p [N], v [N], vmax, mk, s, e_out;
    int emax, k;
    logic [MANT_W-1:0] m_ref [N];
    for (int i = 0; i < int'(N); i++)
      in_res[i] = '{acc: ACC_W'(acc[i]), esum: ESUM_W'(esum[i]), sprod: SPROD_W'(sprod[i])};
    emax = esum[0];
    for (int i = 1; i < int'(N); i++) emax = (esum[i] > emax) ? esum[i] : emax;
    vmax = 0;
    for (int i = 0; i < int'(N); i++) begin
      p[i] = longint'(acc[i] < 0 ? -acc[i] : acc[i]) * longint'(sprod[i]);
      v[i] = (emax - esum[i] >= 28) ? 0 : p[i] / (longint'(1) << (emax - esum[i]));
      if (v[i] > vmax) vmax = v[i];
      if (emax != esum[i] && p[i] != 0) n_align++;
    end
    k = 0;
    while ((vmax >> k) > 31 * 255) k++;
    if (k > 0) n_kshift++;
    mk = vmax >> k;
    s = (mk == 0) ? 1 : (mk + 30) / 31;
    for (int i = 0; i < int'(N); i++) begin
      longint q;
      q = ((v[i] >> k) + s / 2) / s;
      if (q > 31) q = 31;
      m_ref[i] = {acc[i] < 0 && q != 0, 5'(q)};
    end
    e_out = emax + k;
    in_valid = 1'b1;
    @(negedge clk);
    in_valid = 1'b0;
    check(out_valid, "out_valid");
    if (e_out < -128) begin
      n_unf++;
      check(out_exp == -8'sd128 && out_scale == 8'd1 && !out_ovf, "underflow block header");
      for (int i = 0; i < int'(N); i++) check(out_mant[i] == '0, "underflow flushes mantissas");
    end else begin
      check(out_scale == SCALE_W'(s), $sformatf("scale %0d vs %0d", out_scale, s));
      check(out_exp == EXP_W'(e_out > 127 ? 127 : e_out), $sformatf("exp %0d vs %0d", out_exp, e_out));
      check(out_ovf == (e_out > 127), "ovf flag");
      if (e_out > 127) n_ovf++;
      for (int i = 0; i < int'(N); i++) begin
        check(out_mant[i] == m_ref[i], $sformatf("lane %0d mant %h vs %h", i, out_mant[i], m_ref[i]));
        if (e_out <= 127 && e_out >= -100 && emax - esum[i] < 28) begin
          real exact, recon, tol;
          exact = real'(acc[i]) / 32.0 * real'(sprod[i]) * (2.0 ** esum[i]);
          recon = (out_mant[i][5] ? -1.0 : 1.0) * real'(out_mant[i][4:0]) / 32.0
                  * real'(out_scale) * (2.0 ** out_exp);
          tol = (real'(out_scale) / 2.0 + 2.0) / 32.0 * (2.0 ** out_exp);
          check((exact - recon) <= tol && (recon - exact) <= tol,
                $sformatf("lane %0d value %g vs %g", i, recon, exact));
        end
      end
    end
  endtask

  initial begin
    int acc [N], esum [N], sprod [N];
    for (int i = 0; i < int'(N); i++) in_res[i] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    // all zero
    for (int i = 0; i < int'(N); i++) begin acc[i] = 0; esum[i] = 3; sprod[i] = 100; end
    run_case(acc, esum, sprod);
    // equal exponents, small values
    for (int i = 0; i < int'(N); i++) begin acc[i] = i * 5 - 7; esum[i] = -4; sprod[i] = 1; end
    run_case(acc, esum, sprod);
    // largest magnitudes
    for (int i = 0; i < int'(N); i++) begin acc[i] = (i % 2) ? -2048 : 2047; esum[i] = 10; sprod[i] = 65025; end
    run_case(acc, esum, sprod);
    // overflow and underflow of the exponent
    for (int i = 0; i < int'(N); i++) begin acc[i] = 1000; esum[i] = 250; sprod[i] = 60000; end
    run_case(acc, esum, sprod);
    for (int i = 0; i < int'(N); i++) begin acc[i] = 3; esum[i] = -256; sprod[i] = 2; end
    run_case(acc, esum, sprod);
    // random rows
    for (int t = 0; t < 3000; t++) begin
      int ebase;
      ebase = $urandom_range(0, 80) - 40;
      for (int i = 0; i < int'(N); i++) begin
        acc[i] = $urandom_range(0, 4095) - 2048;
        if (t % 3 == 0) acc[i] = acc[i] / 64;
        esum[i] = ebase + ((t % 4 == 0) ? 0 : $urandom_range(0, 12));
        sprod[i] = (t % 5 == 0) ? $urandom_range(1, 4) : $urandom_range(1, 65025);
      end
      run_case(acc, esum, sprod);
    end
    check(n_align > 0 && n_kshift > 0 && n_ovf > 0 && n_unf > 0, "all cases exercised");
    $display("aligned lanes %0d, blocks with extra shift %0d, overflow %0d, underflow %0d",
             n_align, n_kshift, n_ovf, n_unf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
