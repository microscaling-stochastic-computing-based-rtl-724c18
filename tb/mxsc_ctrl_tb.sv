// Testbench for mxsc_ctrl (N = 4, P = 8, L = 32): plays the array's part
// (pe_done 2N cycles after the fin flag, as the skewed array gives it) and
// checks the schedule: every element index held for L/P cycles, vld for
// exactly k*L/P cycles, clr on the first and fin on the last stream cycle,
// one drain_load after pe_done, N conversion cycles with rows N-1 down to 0,
// done exactly k*L/P + 3N + 3 cycles after start, busy in between, a zero
// length ignored and a length above DEPTH clamped.
module mxsc_ctrl_tb;
  localparam int unsigned N = 4;
  localparam int unsigned P = 8;
  localparam int unsigned L = 32;
  localparam int unsigned DEPTH = 32;
  localparam int unsigned C = L / P;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0, pe_done = 1'b0;
  logic [5:0] k_len;
  logic busy, done, s_vld, s_clr, s_fin, drain_load, drain_shift, conv_valid;
  logic [4:0] rd_idx;
  logic [1:0] conv_row;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mxsc_ctrl #(.N(N), .P(P), .L(L), .DEPTH(DEPTH)) dut (
    .clk, .rst_n, .start, .k_len, .pe_done, .busy, .done, .rd_idx, .s_vld, .s_clr, .s_fin,
    .drain_load, .drain_shift, .conv_valid, .conv_row);

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

  task automatic run_op(input int k);
    int kk, cyc, n_vld, n_clr, n_fin, n_load, n_conv, t_fin, t_done, t_load;
    int exp_row;
    kk = (k > int'(DEPTH)) ? int'(DEPTH) : k;
    n_vld = 0; n_clr = 0; n_fin = 0; n_load = 0; n_conv = 0; t_fin = -1; t_done = -1; t_load = -1;
    exp_row = int'(N) - 1;
    start = 1'b1; k_len = 6'(k);
    @(negedge clk);
    start = 1'b0;
    // cycle 0 is the cycle after the one in which start was sampled
    for (cyc = 1; cyc < 2000 && t_done < 0; cyc++) begin
      pe_done = (t_fin >= 0 && cyc == t_fin + 2 * int'(N));
      #1;
      if (s_vld) begin
        check(int'(rd_idx) == n_vld / int'(C), $sformatf("rd_idx %0d at stream cycle %0d", rd_idx, n_vld));
        check(s_clr == (n_vld == 0), "clr on first stream cycle only");
        check(s_fin == (n_vld == kk * int'(C) - 1), "fin on last stream cycle only");
        if (s_fin) t_fin = cyc;
        n_vld++;
        n_clr += s_clr; n_fin += s_fin;
      end else begin
        check(!s_clr && !s_fin, "flags without vld");
      end
      if (drain_load) begin
        n_load++; t_load = cyc;
        check(t_fin >= 0 && cyc == t_fin + 2 * int'(N) + 1, "drain_load follows pe_done");
      end
      if (conv_valid) begin
        check(drain_shift, "shift with conversion");
        check(int'(conv_row) == exp_row, $sformatf("conv row %0d vs %0d", conv_row, exp_row));
        exp_row--;
        n_conv++;
      end
      if (done) t_done = cyc;
      else check(busy, "busy during operation");
      @(negedge clk);
    end
    pe_done = 1'b0;
    check(n_vld == kk * int'(C), $sformatf("stream cycles %0d vs %0d", n_vld, kk * C));
    check(n_clr == 1 && n_fin == 1 && n_load == 1, "one clr, fin and load");
    check(n_conv == int'(N), "N conversion cycles");
    check(t_done == kk * int'(C) + 3 * int'(N) + 3, $sformatf("done after %0d cycles, expected %0d",
          t_done, kk * C + 3 * N + 3));
    #1;
    check(!busy && !done, "idle after done");
  endtask

  initial begin
    k_len = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!busy && !done && !s_vld, "idle after reset");
    // zero length is ignored
    start = 1'b1; k_len = '0;
    @(negedge clk);
    start = 1'b0;
    #1;
    check(!busy, "zero length ignored");
    @(negedge clk);
    run_op(1);
    run_op(5);
    run_op(32);
    run_op(40);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
