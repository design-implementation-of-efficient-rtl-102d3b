// fft16_radix4: 16-point radix-4 FFT / IFFT computed in one clock cycle.
//
// The flow graph has two stages of four radix-4 butterflies. Stage 1
// butterfly p (p = 0..3) takes inputs x[p], x[p+4], x[p+8], x[p+12] with no
// twiddles; its output q goes to row 4q+p. Stage 2 butterfly q takes rows
// 4q..4q+3, multiplies row 4q+p by W16^(q*p) (the twiddle exponents 0,0,0,0 /
// 0,1,2,3 / 0,2,4,6 / 0,3,6,9 of the published flow graph) and writes its
// output k to row 4q+k. Row 4q+k holds frequency bin q+4k, so the output is in
// digit-reversed order: rows 0,1,2,3 hold bins 0,4,8,12, and so on. Inputs are
// in natural order.
//
// inverse = 0: y = sum_n x[n] W16^(nk), no scaling.
// inverse = 1: y = (1/16) sum_n x[n] W16^(-nk); each stage divides by 4 with
//              rounding, so the inverse transform cannot overflow.
// Internal words grow by 3 bits per stage; the result is saturated to DW bits.
// The scaling split and the saturation are this implementation's choices.
//
// Timing: the whole transform is combinational from x to a register; y and
// out_valid appear one clock after in_valid (the published design computes
// the transform in one cycle). Synchronous active-high reset clears out_valid.
module fft16_radix4
  import ofdm_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  in_valid,
  input  logic  inverse,     // 1 = IFFT (transmitter), 0 = FFT (receiver)
  input  cplx_t x [N_FFT],   // natural order
  output logic  out_valid,
  output cplx_t y [N_FFT]    // digit-reversed order: y[4q+k] = bin q+4k
);

  localparam int W1 = DW;      // stage-1 input width
  localparam int W2 = DW + 3;  // stage-2 input width
  localparam int W3 = DW + 6;  // stage-2 output width

  logic signed [W1-1:0] s0_re [4][4], s0_im [4][4];  // [butterfly][input]
  logic signed [W2-1:0] b1_re [4][4], b1_im [4][4];  // stage-1 outputs [p][q]
  logic signed [W2-1:0] s1_re [4][4], s1_im [4][4];  // stage-2 inputs [q][p]
  logic signed [W3-1:0] b2_re [4][4], b2_im [4][4];  // stage-2 outputs [q][k]

  // Divide by 4 with rounding to nearest (inverse transform only).
  function automatic logic signed [W3-1:0] scale4(input logic signed [W3-1:0] v,
                                                  input logic en);
    return en ? (v + W3'(2)) >>> 2 : v;
  endfunction

  function automatic sample_t sat(input logic signed [W3-1:0] v);
    localparam logic signed [W3-1:0] MAXV = W3'((1 << (DW - 1)) - 1);
    localparam logic signed [W3-1:0] MINV = -W3'(1 << (DW - 1));
    if (v > MAXV) return sample_t'(MAXV);
    if (v < MINV) return sample_t'(MINV);
    return sample_t'(v);
  endfunction

  always_comb begin
    for (int p = 0; p < 4; p++)
      for (int m = 0; m < 4; m++) begin
        s0_re[p][m] = x[p + 4*m].re;
        s0_im[p][m] = x[p + 4*m].im;
      end
  end

  for (genvar p = 0; p < 4; p++) begin : g_stage1
    radix4_butterfly #(.W(W1), .K1(0), .K2(0), .K3(0)) u_bf (
      .inverse (inverse),
      .p_re    (s0_re[p]),
      .p_im    (s0_im[p]),
      .x_re    (b1_re[p]),
      .x_im    (b1_im[p])
    );
  end

  // Reorder stage-1 outputs into stage-2 groups; scale for the inverse.
  always_comb begin
    for (int q = 0; q < 4; q++)
      for (int p = 0; p < 4; p++) begin
        s1_re[q][p] = W2'(scale4(W3'(b1_re[p][q]), inverse));
        s1_im[q][p] = W2'(scale4(W3'(b1_im[p][q]), inverse));
      end
  end

  for (genvar q = 0; q < 4; q++) begin : g_stage2
    radix4_butterfly #(.W(W2), .K1(q), .K2(2*q), .K3(3*q)) u_bf (
      .inverse (inverse),
      .p_re    (s1_re[q]),
      .p_im    (s1_im[q]),
      .x_re    (b2_re[q]),
      .x_im    (b2_im[q])
    );
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
    end
    if (in_valid) begin
      for (int q = 0; q < 4; q++)
        for (int k = 0; k < 4; k++) begin
          y[4*q + k].re <= sat(scale4(b2_re[q][k], inverse));
          y[4*q + k].im <= sat(scale4(b2_im[q][k], inverse));
        end
    end
  end

endmodule
