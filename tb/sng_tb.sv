// Testbench for sng: models the P generators of the SNG (seeds from the
// shared seed function, LFSR steps and XOR mixing from their definitions)
// and checks every output bit, the registered side information, zero output
// when no element is valid, and that a bitstream of L = 32 bits, delivered
// in L/P cycles, carries about m ones for magnitude m.
module sng_tb;
  import mxsc_pkg::*;
  localparam int unsigned P = 8;
  localparam int unsigned SEED_BASE = 5;
  localparam int unsigned C = SC_L / P;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  mx_side_t in_side, out_side;
  logic [MAG_W-1:0] in_mag;
  logic [P-1:0] out_bits;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sng #(.P(P), .SEED_BASE(SEED_BASE)) dut (.clk, .rst_n, .in_side, .in_mag, .out_side, .out_bits);

  function automatic logic [15:0] gstep(input logic [15:0] s, input logic [15:0] mask);
    return s[0] ? ((s >> 1) ^ mask) : (s >> 1);
  endfunction

  function automatic logic [7:0] mix(input logic [15:0] a, input logic [15:0] b);
    logic [7:0] r;
    for (int i = 0; i < 8; i++)
      r[i] = a[i] ^ a[i+8] ^ b[2*i] ^ b[2*i+1];
    return r;
  endfunction

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
    logic [15:0] la [P], lb [P];
    logic [P-1:0] exp_bits;
    mx_side_t exp_side;
    int ones, total_err, n_elem;
    for (int p = 0; p < P; p++) begin
      la[p] = seed_mix(SEED_BASE * 128 + 2 * p);
      lb[p] = seed_mix(SEED_BASE * 128 + 2 * p + 1);
    end
    in_side = '0;
    in_mag = '0;
    total_err = 0;
    n_elem = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    check(out_bits == '0 && out_side == '0, "reset state");
    for (int e = 0; e < 600; e++) begin
      logic [MAG_W-1:0] m;
      logic v;
      m = (e < 32) ? MAG_W'(e) : MAG_W'($urandom_range(0, 31));
      v = (e % 10 != 9);
      ones = 0;
      for (int c = 0; c < int'(C); c++) begin
        in_mag = m;
        in_side = '{vld: v, clr: (c == 0), fin: (c == int'(C) - 1), sign: e[0],
                    exp: EXP_W'(e), scale: SCALE_W'(3 * e)};
        for (int p = 0; p < P; p++)
          exp_bits[p] = v && (mix(la[p], lb[p]) % 32 < m);
        exp_side = in_side;
        @(negedge clk);
        for (int p = 0; p < P; p++) begin
          la[p] = gstep(la[p], 16'hB400);
          lb[p] = gstep(lb[p], 16'hD008);
        end
        check(out_bits == exp_bits, $sformatf("elem %0d cyc %0d bits %b vs %b", e, c, out_bits, exp_bits));
        check(out_side == exp_side, $sformatf("elem %0d side", e));
        ones += $countones(out_bits);
      end
      if (v) begin
        total_err += (ones > m) ? ones - m : m - ones;
        n_elem++;
        // a single 32-bit stream stays within a few counts of m
        check(ones <= m + 9 && ones + 9 >= m, $sformatf("elem %0d: %0d ones for m=%0d", e, ones, m));
      end else begin
        check(ones == 0, "invalid element produced ones");
      end
    end
    // mean absolute error of one stream, in counts out of 32
    check(total_err < 3 * n_elem, $sformatf("mean abs error %0d/%0d", total_err, n_elem));
    $display("mean abs error per 32-bit stream: %0d/%0d counts", total_err, n_elem);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
