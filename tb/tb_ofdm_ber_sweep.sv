// tb_ofdm_ber_sweep: bit-error rate of the 16-QAM OFDM transceiver against
// signal-to-noise ratio, the curve that motivates the choice of 16-QAM.
// Random bits run through the transmitter, then through a channel that adds
// approximately Gaussian noise (sum of 12 uniform variables) of standard
// deviation SIGMA to each real and imaginary sample, then through the
// receiver. For each noise level it counts bit errors over NSYM symbols and
// prints the BER with the SNR (average signal power of a 16-QAM point,
// 10 * QAM_UNIT^2 / 16 per time sample, over the noise power 2 * SIGMA^2).
// Checks: no errors without noise, errors at the strongest noise, and a BER
// that does not fall as the noise grows.
module tb_ofdm_ber_sweep;
  import ofdm_pkg::*;
  import tb_ofdm_ref_pkg::*;

  localparam int NLEVEL = 5;
  localparam int NSYM   = 100;
  localparam int SIGMA [NLEVEL] = '{0, 100, 200, 300, 450};

  int checks = 0, failures = 0;
  logic  clk = 0, rst = 1;
  logic  tx_bit = 0, tx_bit_valid = 0, tx_valid, rx_valid = 0, rx_bit, rx_bit_valid;
  cplx_t tx_data, rx_data;

  ofdm_transceiver dut (
    .clk(clk), .rst(rst),
    .tx_bit(tx_bit), .tx_bit_valid(tx_bit_valid), .tx_valid(tx_valid), .tx_data(tx_data),
    .rx_valid(rx_valid), .rx_data(rx_data), .rx_bit(rx_bit), .rx_bit_valid(rx_bit_valid)
  );

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int sigma = 0;

  // Approximately Gaussian integer noise with standard deviation s.
  function automatic int gauss(input int s);
    real acc = 0.0;
    for (int i = 0; i < 12; i++) acc += real'($urandom % 65536) / 65536.0;
    return $rtoi((acc - 6.0) * real'(s));
  endfunction

  always @(negedge clk) begin
    rx_valid = 0;
    if (!rst && tx_valid) begin
      rx_valid   = 1;
      rx_data.re = sample_t'(int'(tx_data.re) + gauss(sigma));
      rx_data.im = sample_t'(int'(tx_data.im) + gauss(sigma));
    end
  end

  logic exp_bits [$];
  int   nbits = 0, nerr = 0;

  always @(negedge clk) if (!rst && rx_bit_valid) begin
    if (exp_bits.size() == 0) begin
      failures++;
      $display("FAIL unexpected output bit");
    end else begin
      if (rx_bit !== exp_bits[0]) nerr++;
      void'(exp_bits.pop_front());
    end
    nbits++;
  end

  initial begin
    real ber [NLEVEL];
    repeat (2) @(negedge clk);
    rst = 0;
    for (int l = 0; l < NLEVEL; l++) begin
      int start_bits, start_err;
      sigma = SIGMA[l];
      start_bits = nbits;
      start_err  = nerr;
      for (int s = 0; s < NSYM; s++) begin
        logic [BITS_PER_OFDM-1:0] bits;
        bits = {$urandom, $urandom};
        for (int b = 0; b < BITS_PER_OFDM; b++) begin
          tx_bit_valid = 1;
          tx_bit       = bits[BITS_PER_OFDM-1-b];
          exp_bits.push_back(tx_bit);
          @(negedge clk);
        end
      end
      tx_bit_valid = 0;
      // let the pipeline drain before the noise level changes
      while (exp_bits.size() != 0) @(negedge clk);
      repeat (5) @(negedge clk);
      checks++;
      if (nbits - start_bits != NSYM * BITS_PER_OFDM) begin
        failures++;
        $display("FAIL level %0d: %0d bits received", l, nbits - start_bits);
      end
      ber[l] = real'(nerr - start_err) / real'(NSYM * BITS_PER_OFDM);
      if (sigma == 0)
        $display("noise sigma %4d: SNR infinite,  bit errors %5d, BER %f", sigma, nerr - start_err, ber[l]);
      else
        $display("noise sigma %4d: SNR %5.1f dB, bit errors %5d, BER %f", sigma,
                 10.0 * $log10(10.0 * real'(QAM_UNIT) * real'(QAM_UNIT) / 16.0 /
                               (2.0 * real'(sigma) * real'(sigma))),
                 nerr - start_err, ber[l]);
    end
    checks++;
    if (ber[0] != 0.0) begin failures++; $display("FAIL errors without noise"); end
    checks++;
    if (ber[NLEVEL-1] == 0.0) begin failures++; $display("FAIL no errors at the strongest noise"); end
    for (int l = 1; l < NLEVEL; l++) begin
      checks++;
      if (ber[l] + 0.002 < ber[l-1]) begin failures++; $display("FAIL BER falls at level %0d", l); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
