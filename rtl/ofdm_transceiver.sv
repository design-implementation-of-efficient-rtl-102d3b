// ofdm_transceiver: 16-subcarrier 16-QAM OFDM transmitter and receiver.
//
// The transmitter turns a serial bit stream into OFDM symbols of
// N_FFT + CP_LEN complex baseband samples; the receiver turns such samples
// back into bits. The radio channel between them (peak clipping, noise,
// multipath) is outside the chip, so the transmitter output and the receiver
// input are separate ports; a loopback connects tx_data to rx_data.
// Both halves share clock and synchronous active-high reset.
// The block chain (S/P, 16-QAM encoder, 16-point radix-4 IFFT, P/S, guard
// interval insertion; and the reverse in the receiver) follows the published
// transceiver model; splitting it into two independent halves with their own
// ports is this implementation's choice. See ofdm_tx and ofdm_rx for timing.
module ofdm_transceiver
  import ofdm_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  // transmitter
  input  logic  tx_bit,
  input  logic  tx_bit_valid,
  output logic  tx_valid,
  output cplx_t tx_data,
  // receiver
  input  logic  rx_valid,
  input  cplx_t rx_data,
  output logic  rx_bit,
  output logic  rx_bit_valid
);

  ofdm_tx u_tx (
    .clk       (clk),
    .rst       (rst),
    .bit_in    (tx_bit),
    .bit_valid (tx_bit_valid),
    .out_valid (tx_valid),
    .out_data  (tx_data)
  );

  ofdm_rx u_rx (
    .clk       (clk),
    .rst       (rst),
    .in_valid  (rx_valid),
    .in_data   (rx_data),
    .bit_out   (rx_bit),
    .bit_valid (rx_bit_valid)
  );

endmodule
