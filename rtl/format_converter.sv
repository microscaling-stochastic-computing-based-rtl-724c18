// Format Converter: turns one row of PE results back into an MX block.
//
// Each PE result is an accumulator a (signed count in units of 1/32), an
// exponent sum e and a scale product s; it stands for the value
// (a/32) * s * 2^e. The converter brings the N values of one array row to a
// common exponent, a common 8-bit linear scale and N 6-bit sign-magnitude
// mantissas, so that output element i is (m_i/32) * scale * 2^exponent:
//   1. multipliers:     p_i = |a_i| * s_i (sign kept apart)
//   2. exp alignment:   emax = max e_i
//   3. shifters:        v_i = p_i >> (emax - e_i)          (truncating)
//   4. Scale_Finder:    k = smallest shift with max(v) >> k <= 31*255,
//                       scale = max(1, ceil((max(v) >> k) / 31))
//   5. dividers:        m_i = min(31, round((v_i >> k) / scale))
//   6. exponent:        emax + k
// The multiplier / exp alignment / shifter / Scale_Finder / divider
// structure follows the architecture. The value convention, the extra shift
// k chosen by the Scale_Finder (needed because an 8-bit scale cannot span
// the 28-bit products), the rounding and the exponent limits are this
// design's choices: an exponent below -128 flushes the block to zero, one
// above 127 is saturated and reported on out_ovf.
//
// Timing: combinational datapath with one output register; out_* hold the
// block converted from in_res one cycle after in_valid.
module format_converter
  import mxsc_pkg::*;
#(
  parameter int unsigned N = 32
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  pe_res_t                 in_res [N],
  output logic                    out_valid,
  output logic [MANT_W-1:0]       out_mant [N],
  output logic [SCALE_W-1:0]      out_scale,
  output logic signed [EXP_W-1:0] out_exp,
  output logic                    out_ovf
);

  localparam int unsigned PW    = ACC_W + SPROD_W;  // product magnitude width
  localparam int unsigned MAXM  = 31;               // largest magnitude
  localparam int unsigned LIMIT = MAXM * 255;       // 31 * largest scale
  localparam int unsigned QW    = 13;               // width of values <= LIMIT

  logic                     sgn  [N];
  logic [PW-1:0]            pmag [N];
  logic [PW-1:0]            v    [N];
  logic [QW-1:0]            vk   [N];
  logic [MAG_W-1:0]         q    [N];
  logic signed [ESUM_W-1:0] emax;
  logic [PW-1:0]            vmax;
  logic [QW-1:0]            mk;
  logic [4:0]               k;
  logic [SCALE_W-1:0]       scale;
  logic signed [ESUM_W+1:0] e_out;

  always_comb begin
    // multipliers
    for (int i = 0; i < N; i++) begin
      logic [ACC_W-1:0] amag;
      sgn[i]  = in_res[i].acc[ACC_W-1];
      amag    = sgn[i] ? ACC_W'(-in_res[i].acc) : ACC_W'(in_res[i].acc);
      pmag[i] = PW'(amag) * PW'(in_res[i].sprod);
    end
    // exp alignment
    emax = in_res[0].esum;
    for (int i = 1; i < N; i++)
      if (in_res[i].esum > emax) emax = in_res[i].esum;
    // shifters
    vmax = '0;
    for (int i = 0; i < N; i++) begin
      logic [ESUM_W:0] d;
      d    = (ESUM_W+1)'(emax - in_res[i].esum);
      v[i] = (d >= (ESUM_W+1)'(PW)) ? '0 : (pmag[i] >> d);
      if (v[i] > vmax) vmax = v[i];
    end
    // Scale_Finder
    k = '0;
    for (int s = PW - 1; s >= 0; s--)
      if ((vmax >> s) > PW'(LIMIT) && k == '0) k = 5'(s + 1);
    mk    = QW'(vmax >> k);
    scale = (mk == '0) ? SCALE_W'(1) : SCALE_W'((mk + QW'(MAXM - 1)) / QW'(MAXM));
    // dividers
    for (int i = 0; i < N; i++) begin
      logic [QW-1:0] r;
      vk[i] = QW'(v[i] >> k);
      r     = (vk[i] + QW'(scale >> 1)) / QW'(scale);
      q[i]  = (r > QW'(MAXM)) ? MAG_W'(MAXM) : MAG_W'(r);
    end
    e_out = (ESUM_W+2)'(emax) + (ESUM_W+2)'(k);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_scale <= '0;
      out_exp   <= '0;
      out_ovf   <= 1'b0;
      for (int i = 0; i < N; i++) out_mant[i] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        if (e_out < -128) begin
          out_scale <= SCALE_W'(1);
          out_exp   <= -8'sd128;
          out_ovf   <= 1'b0;
          for (int i = 0; i < N; i++) out_mant[i] <= '0;
        end else begin
          out_scale <= scale;
          out_exp   <= (e_out > 127) ? 8'sd127 : EXP_W'(e_out);
          out_ovf   <= (e_out > 127);
          for (int i = 0; i < N; i++)
            out_mant[i] <= {sgn[i] && (q[i] != '0), q[i]};
        end
      end
    end
  end

endmodule
