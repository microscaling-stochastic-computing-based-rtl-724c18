// Shared constants and types of the MX-SC systolic array.
//
// The number formats follow the microscaling (MX) layout the array is built
// around: a 6-bit signed mantissa per element, an 8-bit shared exponent and an
// 8-bit linear scale factor per block. Mantissas are kept in sign-magnitude
// form (bit 5 is the sign, bits 4:0 the magnitude) because only the magnitude
// is turned into a unipolar stochastic bitstream; the sign is handled in
// binary. A magnitude m stands for the fraction m/32, so a bitstream of
// length L = 32 can represent every magnitude exactly in expectation.
// The 12-bit accumulator, 8-bit exponent and scale widths, the 16-bit scale
// product and L = 32 come from the architecture description; the 9-bit
// exponent sum, the stream flags and the result record are this design's.
package mxsc_pkg;

  localparam int unsigned MANT_W  = 6;   // signed mantissa, sign-magnitude
  localparam int unsigned MAG_W   = 5;   // magnitude part
  localparam int unsigned EXP_W   = 8;   // shared exponent, two's complement
  localparam int unsigned SCALE_W = 8;   // linear scale factor, unsigned
  localparam int unsigned SC_L    = 32;  // stochastic bitstream length
  localparam int unsigned ACC_W   = 12;  // PE accumulator
  localparam int unsigned ESUM_W  = EXP_W + 1;    // exponent sum in a PE
  localparam int unsigned SPROD_W = 2 * SCALE_W;  // scale product in a PE

  // Side information that travels with a stochastic stream: stream flags,
  // the mantissa sign and the block's exponent and scale.
  typedef struct packed {
    logic                    vld;    // stream cycle carries data
    logic                    clr;    // first stream cycle of a block
    logic                    fin;    // last stream cycle of a block
    logic                    sign;   // mantissa sign of the current element
    logic signed [EXP_W-1:0] exp;    // block exponent
    logic [SCALE_W-1:0]      scale;  // block scale factor
  } mx_side_t;

  // One PE result: accumulated stochastic count, exponent sum and scale
  // product of the two operand blocks.
  typedef struct packed {
    logic signed [ACC_W-1:0]  acc;
    logic signed [ESUM_W-1:0] esum;
    logic [SPROD_W-1:0]       sprod;
  } pe_res_t;

  // Non-zero 16-bit LFSR seed derived from an identifier. Every generator in
  // the array calls this with a different identifier so that no two of them
  // run in step.
  function automatic logic [15:0] seed_mix(input int unsigned id);
    logic [31:0] h;
    h = (id + 32'd1) * 32'h9E37_79B1;
    h = h ^ (h >> 15);
    h = h * 32'h85EB_CA6B;
    h = h ^ (h >> 13);
    return (h[15:0] == 16'h0) ? 16'h0001 : h[15:0];
  endfunction

endpackage
