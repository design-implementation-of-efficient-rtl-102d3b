// ofdm_tx: OFDM transmitter, 16 subcarriers, 16-QAM.
//
// Data path, as in the published transmitter diagram:
//   serial bits -> S/P (64 bits) -> 16 x 16-QAM encoder -> 16-point radix-4
//   IFFT -> P/S (16 complex samples) -> guard-interval (cyclic-prefix)
//   insertion -> N_FFT + CP_LEN complex samples per OFDM symbol.
// Bits 4k .. 4k+3 of a symbol (in arrival order, the first as the most
// significant) modulate subcarrier k. The IFFT delivers its bins in
// digit-reversed order; they are put back in natural order (time sample n at
// position n) before the P/S converter. The bit-to-subcarrier order is this
// implementation's choice.
//
// Timing: one bit per clock with bit_valid. The clock after the 64th bit of a
// symbol the encoded vector enters the IFFT, one clock later the 16 samples
// start leaving the P/S converter, and after the 16th the cyclic-prefix unit
// sends N_FFT + CP_LEN samples on consecutive clocks. A new symbol must not
// complete within N_FFT + CP_LEN + 18 clocks of the previous one; a
// continuous bit stream takes 64 clocks per symbol and always meets this.
// Synchronous active-high reset.
module ofdm_tx
  import ofdm_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  bit_in,
  input  logic  bit_valid,
  output logic  out_valid,
  output cplx_t out_data
);

  logic       sp_valid;
  logic [0:0] sp_bits [BITS_PER_OFDM];
  cplx_t      qam    [N_FFT];
  logic       ifft_valid;
  cplx_t      ifft_dr  [N_FFT];   // digit-reversed
  logic [$bits(cplx_t)-1:0] ifft_nat [N_FFT];
  logic       ps_ready;
  logic       ps_valid;
  logic [$bits(cplx_t)-1:0] ps_data;
  logic       cp_busy;

  sp_converter #(.W(1), .N(BITS_PER_OFDM)) u_sp (
    .clk       (clk),
    .rst       (rst),
    .in_valid  (bit_valid),
    .in_data   (bit_in),
    .out_valid (sp_valid),
    .out_data  (sp_bits)
  );

  for (genvar k = 0; k < N_FFT; k++) begin : g_map
    qam16_mapper u_map (
      .bits  ({sp_bits[4*k][0], sp_bits[4*k+1][0], sp_bits[4*k+2][0], sp_bits[4*k+3][0]}),
      .point (qam[k])
    );
  end

  fft16_radix4 u_ifft (
    .clk       (clk),
    .rst       (rst),
    .in_valid  (sp_valid),
    .inverse   (1'b1),
    .x         (qam),
    .out_valid (ifft_valid),
    .y         (ifft_dr)
  );

  // Digit reversal: sample n = q + 4k sits in row 4q + k.
  always_comb begin
    for (int n = 0; n < N_FFT; n++) ifft_nat[n] = ifft_dr[4*(n % 4) + n / 4];
  end

  ps_converter #(.W($bits(cplx_t)), .N(N_FFT)) u_ps (
    .clk       (clk),
    .rst       (rst),
    .load      (ifft_valid),
    .in_data   (ifft_nat),
    .ready     (ps_ready),
    .out_valid (ps_valid),
    .out_data  (ps_data)
  );

  cp_insert u_cp (
    .clk       (clk),
    .rst       (rst),
    .in_valid  (ps_valid),
    .in_data   (cplx_t'(ps_data)),
    .busy      (cp_busy),
    .out_valid (out_valid),
    .out_data  (out_data)
  );

  a_rate: assert property (@(posedge clk) disable iff (rst) ifft_valid |-> ps_ready && !cp_busy)
    else $error("ofdm_tx: symbols arrive faster than the transmitter can send them");

endmodule
