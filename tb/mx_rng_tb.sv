// Testbench for mx_rng: compares the 8-bit output with a model of the two
// LFSRs and the XOR mixing written from the bit definitions, and checks that
// the five LSBs used for bitstream generation are close to uniform.
module mx_rng_tb;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic en = 1'b0;
  logic [7:0] rnd;
  int checks = 0, failures = 0;
  int hist [32];

  always #5 clk = ~clk;

  mx_rng #(.SEED_A(16'h5A17), .SEED_B(16'h00C3)) dut (.clk, .rst_n, .en, .rnd);

  // Galois LFSR step, shifting right, mask applied when bit 0 is one
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
    logic [15:0] ma, mb;
    localparam int SAMPLES = 32768;
    ma = 16'h5A17; mb = 16'h00C3;
    foreach (hist[i]) hist[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(rnd == mix(ma, mb), "output after reset");
    en = 1'b1;
    for (int t = 0; t < SAMPLES; t++) begin
      @(negedge clk);
      ma = gstep(ma, 16'hB400);
      mb = gstep(mb, 16'hD008);
      if (t < 2000) check(rnd == mix(ma, mb), $sformatf("cycle %0d: %h vs %h", t, rnd, mix(ma, mb)));
      hist[rnd[4:0]]++;
    end
    // each 5-bit value should occur about SAMPLES/32 = 1024 times
    for (int v = 0; v < 32; v++)
      check(hist[v] > 880 && hist[v] < 1170, $sformatf("value %0d occurs %0d times", v, hist[v]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
