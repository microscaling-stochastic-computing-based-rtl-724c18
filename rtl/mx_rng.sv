// Random number generator of the stochastic number generator: two 16-bit
// LFSRs mixed by XOR into one 8-bit random value per cycle.
//
// Each LFSR state is cut into two 8-bit words. The first LFSR gives its upper
// and lower halves; the second gives its even-numbered bits and its
// odd-numbered bits. The four words are combined by a two-level tree of XOR
// gates into the 8-bit output. XOR mixing of two LFSRs with different
// polynomials breaks the strong correlation between neighbouring values of a
// single LFSR, so that short bitstreams (L = 32) are accurate enough.
// The two 16-bit LFSRs, the split into 8-bit words and the XOR mixing follow
// the architecture; which bits form each word, the polynomials and the seeds
// are this design's choices. Only rnd[4:0] is used by the SNG.
//
// Interface: `en` steps both LFSRs; `rnd` is combinational from the two
// current states, so it changes one cycle after each enabled clock edge.
module mx_rng #(
  parameter logic [15:0] SEED_A = 16'hACE1,
  parameter logic [15:0] SEED_B = 16'h1D2B
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  output logic [7:0] rnd
);

  logic [15:0] sa, sb;
  logic [7:0]  a_hi, a_lo, b_even, b_odd;

  // x^16 + x^14 + x^13 + x^11 + 1
  lfsr16 #(.TAPS(16'hB400), .SEED(SEED_A)) u_lfsr_a (
    .clk, .rst_n, .en, .state(sa)
  );
  // x^16 + x^15 + x^13 + x^4 + 1
  lfsr16 #(.TAPS(16'hD008), .SEED(SEED_B)) u_lfsr_b (
    .clk, .rst_n, .en, .state(sb)
  );

  always_comb begin
    a_hi = sa[15:8];
    a_lo = sa[7:0];
    for (int i = 0; i < 8; i++) begin
      b_even[i] = sb[2*i];
      b_odd[i]  = sb[2*i+1];
    end
    rnd = (a_hi ^ a_lo) ^ (b_even ^ b_odd);
  end

endmodule
