// Processing element of the MX-SC systolic array.
//
// Stochastic part: the P row bits and P column bits of the current cycle are
// ANDed (P unipolar multiplications), the ones are counted by an adder tree,
// the count is negated when the XOR of the two mantissa signs is one (two's
// complement), and the result is added into the 12-bit accumulator Acc_reg.
// Over the L/P cycles of one element the accumulator thus gains about
// m_a*m_b/32 counts; over a block it holds the signed dot product of the
// two mantissa vectors in units of 1/32.
// Binary part: once per block, on the first stream cycle (clr flag), the two
// 8-bit block exponents are added into Exp_reg and the two 8-bit scale
// factors multiplied into the 16-bit Scale_reg; the same cycle restarts the
// accumulator.
// Both streams are passed on, one cycle later, to the right and downwards.
// A drain register per PE forms a vertical shift chain that carries finished
// results down to the Format Converter.
// The adder, multiplier, XOR, AND, two's-complement and accumulator structure
// and the widths 8/16/12 follow the architecture; the 9-bit exponent sum, the
// stream flags and the drain chain are this design's.
//
// Timing: a result is complete in the cycle after the PE sees the fin flag;
// `done` is high in that cycle. drain_load copies the result into the drain
// register; drain_shift takes the drain register of the PE above.
module pe
  import mxsc_pkg::*;
#(
  parameter int unsigned P = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  // row stream, from the left and to the right
  input  mx_side_t     w_side,
  input  logic [P-1:0] w_bits,
  output mx_side_t     e_side,
  output logic [P-1:0] e_bits,
  // column stream, from above and downwards
  input  mx_side_t     n_side,
  input  logic [P-1:0] n_bits,
  output mx_side_t     s_side,
  output logic [P-1:0] s_bits,
  // result readout
  input  logic         drain_load,
  input  logic         drain_shift,
  input  pe_res_t      res_in,
  output pe_res_t      res_out,
  output logic         done
);

  localparam int unsigned CNT_W = $clog2(P + 1);

  logic signed [ACC_W-1:0]  acc_q;
  logic signed [ESUM_W-1:0] esum_q;
  logic [SPROD_W-1:0]       sprod_q;

  logic [CNT_W-1:0]        cnt;
  logic                    neg;
  logic signed [ACC_W-1:0] contrib;

  // Adder tree over the P AND gates.
  function automatic logic [CNT_W-1:0] ones(input logic [P-1:0] v);
    logic [CNT_W-1:0] s;
    s = '0;
    for (int i = 0; i < P; i++)
      s = s + CNT_W'(v[i]);
    return s;
  endfunction

  always_comb begin
    cnt     = ones(w_bits & n_bits);
    neg     = w_side.sign ^ n_side.sign;
    contrib = neg ? -ACC_W'(cnt) : ACC_W'(cnt);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      e_side  <= '0;
      e_bits  <= '0;
      s_side  <= '0;
      s_bits  <= '0;
      acc_q   <= '0;
      esum_q  <= '0;
      sprod_q <= '0;
      done    <= 1'b0;
      res_out <= '0;
    end else begin
      e_side <= w_side;
      e_bits <= w_bits;
      s_side <= n_side;
      s_bits <= n_bits;
      if (w_side.vld) begin
        if (w_side.clr) begin
          acc_q   <= contrib;
          esum_q  <= ESUM_W'(w_side.exp) + ESUM_W'(n_side.exp);
          sprod_q <= SPROD_W'(w_side.scale) * SPROD_W'(n_side.scale);
        end else begin
          acc_q <= acc_q + contrib;
        end
      end
      done <= w_side.vld && w_side.fin;
      if (drain_load)
        res_out <= '{acc: acc_q, esum: esum_q, sprod: sprod_q};
      else if (drain_shift)
        res_out <= res_in;
    end
  end

  // Row and column streams must be aligned: both carry the same flags.
  a_aligned : assert property (@(posedge clk) disable iff (!rst_n)
    (w_side.vld == n_side.vld) && (w_side.clr == n_side.clr) && (w_side.fin == n_side.fin));

endmodule
