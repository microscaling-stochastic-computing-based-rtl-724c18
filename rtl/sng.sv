// Stochastic number generator (SNG) shared by one row or one column of the
// systolic array.
//
// The SNG turns the 5-bit magnitude m of the current MX mantissa into P
// unipolar stochastic bits per clock cycle. It holds P random number
// generators (mx_rng), each with its own seeds; bit p is one when the five
// least significant bits of generator p are below m, so it is one with
// probability m/32. A full bitstream of length L = 32 therefore takes L/P
// cycles, during which the same element is presented. The sign, exponent,
// scale and stream flags are not converted: they are registered alongside the
// bits so that the PE sees them in the same cycle.
// P parallel generators, the use of the five LSBs and sharing one SNG per row
// or column follow the architecture. The comparator form of the conversion,
// free-running generators, the output register and the seed assignment are
// this design's choices.
//
// Interface: in_side/in_mag are sampled every cycle; out_side/out_bits appear
// one cycle later. While in_side.vld is low the output bits are zero.
// SEED_BASE must differ between the SNGs of one array.
module sng
  import mxsc_pkg::*;
#(
  parameter int unsigned P         = 8,
  parameter int unsigned SEED_BASE = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  mx_side_t         in_side,
  input  logic [MAG_W-1:0] in_mag,
  output mx_side_t         out_side,
  output logic [P-1:0]     out_bits
);

  logic [7:0] rnd [P];

  for (genvar p = 0; p < P; p++) begin : g_rng
    mx_rng #(
      .SEED_A(seed_mix(SEED_BASE * 128 + 2 * p)),
      .SEED_B(seed_mix(SEED_BASE * 128 + 2 * p + 1))
    ) u_rng (
      .clk, .rst_n, .en(1'b1), .rnd(rnd[p])
    );
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_side <= '0;
      out_bits <= '0;
    end else begin
      out_side <= in_side;
      for (int p = 0; p < P; p++)
        out_bits[p] <= in_side.vld && (rnd[p][MAG_W-1:0] < in_mag);
    end
  end

endmodule
