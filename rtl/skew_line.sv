// Delay line of DELAY register stages (DELAY = 0 is a plain wire).
//
// Used to skew the operand streams at the array edges: row i and column j
// are delayed by i and j cycles so that their elements meet in PE (i,j).
// The skew is the usual systolic arrangement and is this design's choice.
// Stages reset to zero so that no stream flag is set after reset. With
// DELAY = 0 (lane 0) clk and rst_n are intentionally left unused.
module skew_line #(
  parameter int unsigned W     = 8,
  parameter int unsigned DELAY = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  if (DELAY == 0) begin : g_wire
    assign q = d;
  end else begin : g_regs
    logic [W-1:0] stage [DELAY];
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        for (int k = 0; k < DELAY; k++) stage[k] <= '0;
      end else begin
        stage[0] <= d;
        for (int k = 1; k < DELAY; k++) stage[k] <= stage[k-1];
      end
    end
    assign q = stage[DELAY-1];
  end

endmodule
