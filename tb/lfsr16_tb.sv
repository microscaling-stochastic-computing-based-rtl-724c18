// Testbench for lfsr16: checks the step rule against an independent
// Fibonacci-free formulation (explicit feedback bit per tap), that the
// sequence has the full period 65535 for both polynomials used in the
// design, that `en` low holds the state, and that a zero seed is replaced.
module lfsr16_tb;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic en = 1'b0;
  logic [15:0] sa, sb, sz;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  lfsr16 #(.TAPS(16'hB400), .SEED(16'hACE1)) dut_a (.clk, .rst_n, .en, .state(sa));
  lfsr16 #(.TAPS(16'hD008), .SEED(16'h1234)) dut_b (.clk, .rst_n, .en, .state(sb));
  lfsr16 #(.TAPS(16'hB400), .SEED(16'h0000)) dut_z (.clk, .rst_n, .en, .state(sz));

  // next state written bit by bit: bit i takes bit i+1, XORed with the
  // outgoing bit 0 at the tap positions of the polynomial
  function automatic logic [15:0] step(input logic [15:0] s, input int unsigned poly);
    logic [15:0] n;
    for (int i = 0; i < 16; i++) begin
      logic in_bit;
      in_bit = (i == 15) ? 1'b0 : s[i+1];
      if (poly == 0) n[i] = in_bit ^ (s[0] & (i == 15 || i == 13 || i == 12 || i == 10));
      else           n[i] = in_bit ^ (s[0] & (i == 15 || i == 14 || i == 12 || i == 3));
    end
    return n;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] ea, eb;
    int period_a, period_b;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(sa == 16'hACE1, "seed A");
    check(sb == 16'h1234, "seed B");
    check(sz == 16'h0001, "zero seed replaced");
    // hold
    repeat (3) @(negedge clk);
    check(sa == 16'hACE1, "en low holds");
    en = 1'b1;
    ea = sa; eb = sb;
    period_a = 0; period_b = 0;
    for (int t = 1; t <= 65535; t++) begin
      @(negedge clk);
      ea = step(ea, 0);
      eb = step(eb, 1);
      if (t < 300 || t % 4096 == 0) begin
        check(sa == ea, $sformatf("A step %0d: %h vs %h", t, sa, ea));
        check(sb == eb, $sformatf("B step %0d: %h vs %h", t, sb, eb));
      end
      if (sa == 16'hACE1 && period_a == 0) period_a = t;
      if (sb == 16'h1234 && period_b == 0) period_b = t;
      if (sa == 16'h0 || sb == 16'h0) check(0, "all-zero state reached");
    end
    check(period_a == 65535, $sformatf("period A = %0d", period_a));
    check(period_b == 65535, $sformatf("period B = %0d", period_b));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
