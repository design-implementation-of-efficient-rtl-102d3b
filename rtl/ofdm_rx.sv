// ofdm_rx: OFDM receiver, 16 subcarriers, 16-QAM.
//
// Data path, as in the published receiver diagram:
//   complex samples -> guard-interval (cyclic-prefix) removal -> S/P
//   (16 samples) -> 16-point radix-4 FFT -> 16 x 16-QAM decoder -> P/S
//   (64 bits) -> serial bits.
// The FFT delivers bins in digit-reversed order; they are put back in natural
// order before decoding, and subcarrier k gives bits 4k .. 4k+3 of the output
// stream (most significant first), the inverse of ofdm_tx. Frame alignment is
// taken from reset: the first sample after reset must be the first prefix
// sample of a symbol. No channel equalisation is done (none is described).
//
// Timing: one sample per clock with in_valid. The 16 kept samples reach the
// FFT two clocks after the last of them is received, and the 64 decoded bits
// leave on bit_out, one per clock with bit_valid, starting one clock later.
// The next symbol's bits may follow back to back, so symbols must arrive no
// more often than once per 64 clocks (the transmitter's rate with a
// continuous bit stream). Synchronous active-high reset.
module ofdm_rx
  import ofdm_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  in_valid,
  input  cplx_t in_data,
  output logic  bit_out,
  output logic  bit_valid
);

  logic  cr_valid, cr_last;
  cplx_t cr_data;
  logic  sp_valid;
  logic [$bits(cplx_t)-1:0] sp_data [N_FFT];
  cplx_t fft_in  [N_FFT];
  logic  fft_valid;
  cplx_t fft_dr  [N_FFT];
  cplx_t fft_nat [N_FFT];
  logic [BITS_PER_SYM-1:0] sym [N_FFT];
  logic [0:0] bits_vec [BITS_PER_OFDM];
  logic  ps_ready;
  logic [0:0] ps_bit;

  cp_remove u_cp (
    .clk       (clk),
    .rst       (rst),
    .in_valid  (in_valid),
    .in_data   (in_data),
    .out_valid (cr_valid),
    .out_last  (cr_last),
    .out_data  (cr_data)
  );

  sp_converter #(.W($bits(cplx_t)), .N(N_FFT)) u_sp (
    .clk       (clk),
    .rst       (rst),
    .in_valid  (cr_valid),
    .in_data   (cr_data),
    .out_valid (sp_valid),
    .out_data  (sp_data)
  );

  always_comb begin
    for (int n = 0; n < N_FFT; n++) fft_in[n] = cplx_t'(sp_data[n]);
  end

  fft16_radix4 u_fft (
    .clk       (clk),
    .rst       (rst),
    .in_valid  (sp_valid),
    .inverse   (1'b0),
    .x         (fft_in),
    .out_valid (fft_valid),
    .y         (fft_dr)
  );

  // Digit reversal: bin k = q + 4m sits in row 4q + m.
  always_comb begin
    for (int k = 0; k < N_FFT; k++) fft_nat[k] = fft_dr[4*(k % 4) + k / 4];
  end

  for (genvar k = 0; k < N_FFT; k++) begin : g_demap
    qam16_demapper u_demap (
      .point (fft_nat[k]),
      .bits  (sym[k])
    );
  end

  always_comb begin
    for (int k = 0; k < N_FFT; k++)
      for (int j = 0; j < BITS_PER_SYM; j++)
        bits_vec[BITS_PER_SYM*k + j] = sym[k][BITS_PER_SYM-1-j];
  end

  ps_converter #(.W(1), .N(BITS_PER_OFDM)) u_ps (
    .clk       (clk),
    .rst       (rst),
    .load      (fft_valid),
    .in_data   (bits_vec),
    .ready     (ps_ready),
    .out_valid (bit_valid),
    .out_data  (ps_bit)
  );

  assign bit_out = ps_bit[0];

  a_rate: assert property (@(posedge clk) disable iff (rst) fft_valid |-> ps_ready)
    else $error("ofdm_rx: symbols arrive faster than their bits can be sent");

  // The S/P converter must see exactly one symbol's worth between frame ends.
  a_aligned: assert property (@(posedge clk) disable iff (rst) cr_last |=> sp_valid)
    else $error("ofdm_rx: S/P converter out of step with the symbol frame");

endmodule
