// Testbench for pe: drives blocks of random stochastic bits, signs,
// exponents and scales and compares the accumulator, exponent sum and scale
// product (read through the drain register) with sums computed here. Also
// checks forwarding of both streams with one cycle delay, the done pulse
// one cycle after the fin flag, the drain shift path and that idle cycles
// do not change the accumulator.
module pe_tb;
  import mxsc_pkg::*;
  localparam int unsigned P = 8;
  localparam int unsigned C = SC_L / P;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  mx_side_t w_side, n_side, e_side, s_side;
  logic [P-1:0] w_bits, n_bits, e_bits, s_bits;
  logic drain_load, drain_shift, done;
  pe_res_t res_in, res_out;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  pe #(.P(P)) dut (.clk, .rst_n, .w_side, .w_bits, .e_side, .e_bits, .n_side, .n_bits,
                   .s_side, .s_bits, .drain_load, .drain_shift, .res_in, .res_out, .done);

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

  initial begin
    int acc_ref, esum_ref, sprod_ref;
    w_side = '0; n_side = '0; w_bits = '0; n_bits = '0;
    drain_load = 0; drain_shift = 0; res_in = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int blk = 0; blk < 40; blk++) begin
      int k;
      logic signed [7:0] ea, eb;
      logic [7:0] sa, sb;
      k = $urandom_range(1, 32);
      ea = 8'($urandom); eb = 8'($urandom);
      sa = 8'($urandom); sb = 8'($urandom);
      if (blk == 0) begin ea = 8'sd127; eb = 8'sd127; sa = 8'd255; sb = 8'd255; end
      if (blk == 1) begin ea = -8'sd128; eb = -8'sd128; end
      acc_ref = 0;
      esum_ref = int'(ea) + int'(eb);
      sprod_ref = int'(sa) * int'(sb);
      for (int e = 0; e < k; e++) begin
        logic sgn_a, sgn_b;
        sgn_a = $urandom_range(0, 1); sgn_b = $urandom_range(0, 1);
        if (blk == 2) begin sgn_a = 0; sgn_b = 1; end
        for (int c = 0; c < int'(C); c++) begin
          mx_side_t ws, ns;
          logic [P-1:0] wb, nb;
          ws = '{vld: 1'b1, clr: (e == 0 && c == 0), fin: (e == k - 1 && c == int'(C) - 1),
                 sign: sgn_a, exp: ea, scale: sa};
          ns = '{vld: 1'b1, clr: ws.clr, fin: ws.fin, sign: sgn_b, exp: eb, scale: sb};
          wb = P'($urandom); nb = P'($urandom);
          if (blk == 2 || blk == 0) begin wb = '1; nb = '1; end
          w_side = ws; n_side = ns; w_bits = wb; n_bits = nb;
          acc_ref += ((sgn_a ^ sgn_b) ? -1 : 1) * $countones(wb & nb);
          @(negedge clk);
          check(e_side == ws && e_bits == wb, "row stream forwarded");
          check(s_side == ns && s_bits == nb, "column stream forwarded");
          check(done == ws.fin, "done one cycle after fin");
        end
      end
      // idle cycles must not disturb the result
      w_side = '0; n_side = '0;
      w_bits = P'($urandom); n_bits = P'($urandom);
      repeat (2) @(negedge clk);
      drain_load = 1;
      @(negedge clk);
      drain_load = 0;
      check(int'(res_out.acc) == acc_ref, $sformatf("blk %0d acc %0d vs %0d", blk, res_out.acc, acc_ref));
      check(int'(res_out.esum) == esum_ref, $sformatf("blk %0d esum %0d vs %0d", blk, res_out.esum, esum_ref));
      check(int'(res_out.sprod) == sprod_ref, $sformatf("blk %0d sprod %0d vs %0d", blk, res_out.sprod, sprod_ref));
      // drain shift takes the value from above
      res_in = '{acc: ACC_W'(blk * 7 - 100), esum: ESUM_W'(blk), sprod: SPROD_W'(blk * 300)};
      drain_shift = 1;
      @(negedge clk);
      drain_shift = 0;
      check(res_out == res_in, "drain shift");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
