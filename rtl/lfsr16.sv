// 16-bit linear feedback shift register.
//
// One of the two registers of the random number generator (mx_rng). It is a
// Galois LFSR that shifts right: when the bit leaving at position 0 is one,
// the feedback mask TAPS is XORed into the shifted state. With a
// maximal-length mask the state runs through all 65535 non-zero values
// before repeating. The 16-bit width is the architecture's; the polynomial,
// the Galois form and the reset are this design's choices, since none of them
// is specified. The default mask 0xB400 is x^16 + x^14 + x^13 + x^11 + 1.
//
// Interface: `en` advances the register by one step at the rising clock edge;
// `state` is the register itself. A synchronous active-low reset loads SEED
// (a zero SEED is replaced by 1, as the all-zero state would lock up).
module lfsr16 #(
  parameter logic [15:0] TAPS = 16'hB400,
  parameter logic [15:0] SEED = 16'hACE1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  output logic [15:0] state
);

  localparam logic [15:0] SEED_NZ = (SEED == 16'h0) ? 16'h0001 : SEED;

  always_ff @(posedge clk) begin
    if (!rst_n)
      state <= SEED_NZ;
    else if (en)
      state <= (state >> 1) ^ (state[0] ? TAPS : 16'h0000);
  end

endmodule
