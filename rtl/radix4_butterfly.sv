// radix4_butterfly: one radix-4 butterfly with twiddle factors on its inputs.
//
// Forward (inverse = 0), with T_i = W16^K_i * P_i and T_0 = P_0:
//   X0 = T0 +  T1 + T2 +  T3
//   X1 = T0 - jT1 - T2 + jT3
//   X2 = T0 -  T1 + T2 -  T3
//   X3 = T0 + jT1 - T2 - jT3
// These are the butterfly equations of the published design. For the inverse
// transform the twiddles are conjugated (W16^-K) and the signs of j flip,
// which is the same as swapping outputs X1 and X3.
//
// Interface: four complex inputs of W bits per part, four complex outputs of
// W+3 bits (one bit for the twiddle product, two for the four-term sum), so
// nothing can overflow. The twiddle exponents are parameters because every
// butterfly in the 16-point flow graph has fixed twiddles. Purely
// combinational; the product is rounded to nearest at TW_FRAC fractional bits
// (own choice).
module radix4_butterfly
  import ofdm_pkg::*;
#(
  parameter int W  = 16,  // input width per real/imaginary part
  parameter int K1 = 0,   // twiddle exponent of input 1 (W16^K1)
  parameter int K2 = 0,   // twiddle exponent of input 2
  parameter int K3 = 0    // twiddle exponent of input 3
) (
  input  logic                  inverse,
  input  logic signed [W-1:0]   p_re [4],
  input  logic signed [W-1:0]   p_im [4],
  output logic signed [W+2:0]   x_re [4],
  output logic signed [W+2:0]   x_im [4]
);

  localparam int PW = W + TW_FRAC + 3;  // full product width
  localparam logic signed [PW-1:0] HALF = PW'(1) <<< (TW_FRAC - 1);

  localparam int KS [4] = '{0, K1, K2, K3};

  logic signed [W:0]   t_re [4];
  logic signed [W:0]   t_im [4];
  logic signed [W+2:0] a_re [4];
  logic signed [W+2:0] a_im [4];

  // Twiddle multiplication: (a + jb)(c - j*s) forward, (a + jb)(c + j*s) inverse.
  always_comb begin
    for (int i = 0; i < 4; i++) begin
      logic signed [PW-1:0] c, s, a, b, pr, pi;
      c  = PW'(cos16(KS[i]));
      s  = inverse ? -PW'(sin16(KS[i])) : PW'(sin16(KS[i]));
      a  = PW'(p_re[i]);
      b  = PW'(p_im[i]);
      pr = a * c + b * s + HALF;
      pi = b * c - a * s + HALF;
      t_re[i] = (W+1)'(pr >>> TW_FRAC);
      t_im[i] = (W+1)'(pi >>> TW_FRAC);
    end
  end

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      a_re[i] = (W+3)'(t_re[i]);
      a_im[i] = (W+3)'(t_im[i]);
    end
  end

  logic signed [W+2:0] y1_re, y1_im, y3_re, y3_im;

  always_comb begin
    x_re[0] = a_re[0] + a_re[1] + a_re[2] + a_re[3];
    x_im[0] = a_im[0] + a_im[1] + a_im[2] + a_im[3];
    x_re[2] = a_re[0] - a_re[1] + a_re[2] - a_re[3];
    x_im[2] = a_im[0] - a_im[1] + a_im[2] - a_im[3];
    // X1 = T0 - jT1 - T2 + jT3
    y1_re = a_re[0] + a_im[1] - a_re[2] - a_im[3];
    y1_im = a_im[0] - a_re[1] - a_im[2] + a_re[3];
    // X3 = T0 + jT1 - T2 - jT3
    y3_re = a_re[0] - a_im[1] - a_re[2] + a_im[3];
    y3_im = a_im[0] + a_re[1] - a_im[2] - a_re[3];
    x_re[1] = inverse ? y3_re : y1_re;
    x_im[1] = inverse ? y3_im : y1_im;
    x_re[3] = inverse ? y1_re : y3_re;
    x_im[3] = inverse ? y1_im : y3_im;
  end

endmodule
