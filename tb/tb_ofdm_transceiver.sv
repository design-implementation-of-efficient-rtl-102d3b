// tb_ofdm_transceiver: end-to-end test of the transmitter and receiver at
// their default sizes. Random bits stream into the transmitter, one per clock
// (with idle clocks in some symbols). Its samples pass through a channel model
// in this testbench: peak clipping of each component at +/-CLIP, a multipath
// echo of 1/16 amplitude delayed by 2 samples (shorter than the cyclic
// prefix), and small uniform noise. The receiver's bits must equal the bits
// sent, and each symbol's first bit must appear END2END clocks after the
// clock edge that took its last bit. The testbench counts how often each
// mechanism of the design happened (S/P vectors, IFFT and FFT runs, prefix
// samples inserted and removed, peak clipping, back-to-back output symbols)
// and fails if one never did.
module tb_ofdm_transceiver;
  import ofdm_pkg::*;
  import tb_ofdm_ref_pkg::*;

  localparam int NSYM    = 40;
  localparam int CLIP    = 1800;
  localparam int END2END = 41;   // 18 (tx) + 20 samples - 1 + 1 (channel) + 3 (rx)

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

  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- mechanism counters -------------------------------------------------
  int n_sp = 0, n_ifft = 0, n_fft = 0, n_cp_ins = 0, n_cp_rem = 0, n_clip = 0;
  int n_b2b = 0, n_gap_sym = 0;
  int tx_run = 0;
  always @(negedge clk) if (!rst) begin
    if (dut.u_tx.sp_valid)      n_sp++;
    if (dut.u_tx.ifft_valid)    n_ifft++;
    if (dut.u_rx.fft_valid)     n_fft++;
    if (rx_valid && dut.u_rx.u_cp.count < CP_LEN) n_cp_rem++;
    if (tx_valid) begin
      if (tx_run < CP_LEN) n_cp_ins++;
      tx_run = (tx_run == N_FFT + CP_LEN - 1) ? 0 : tx_run + 1;
    end
  end

  // ---- channel: clipping, 2-sample echo, noise -----------------------------
  function automatic int clip(input int v);
    if (v > CLIP)  return CLIP;
    if (v < -CLIP) return -CLIP;
    return v;
  endfunction

  int hist_re [2], hist_im [2];
  initial begin hist_re = '{0, 0}; hist_im = '{0, 0}; end

  always @(negedge clk) begin
    rx_valid = 0;
    if (!rst && tx_valid) begin
      int cr, ci;
      cr = clip(int'(tx_data.re));
      ci = clip(int'(tx_data.im));
      if (cr != int'(tx_data.re) || ci != int'(tx_data.im)) n_clip++;
      rx_valid   = 1;
      rx_data.re = sample_t'(cr + (hist_re[1] >>> 4) + urand_range(-16, 16));
      rx_data.im = sample_t'(ci + (hist_im[1] >>> 4) + urand_range(-16, 16));
      hist_re[1] = hist_re[0];
      hist_im[1] = hist_im[0];
      hist_re[0] = cr;
      hist_im[0] = ci;
    end
  end

  // ---- receiver output checker ---------------------------------------------
  logic exp_bits [$];
  int   due [$];
  int   nbits = 0, bit_errors = 0;
  logic prev_valid = 0;

  always @(negedge clk) if (!rst) begin
    if (rx_bit_valid) begin
      if (nbits % BITS_PER_OFDM == 0) begin
        checks++;
        if (due.size() == 0 || cycle != due[0]) begin
          failures++;
          $display("FAIL symbol %0d first bit in cycle %0d, due %0d", nbits / BITS_PER_OFDM, cycle,
                   due.size() ? due[0] : -1);
        end
        if (due.size()) void'(due.pop_front());
        if (prev_valid) n_b2b++;
      end
      checks++;
      if (exp_bits.size() == 0 || rx_bit !== exp_bits[0]) begin
        failures++;
        bit_errors++;
        if (bit_errors < 10) $display("FAIL bit %0d", nbits);
      end
      if (exp_bits.size()) void'(exp_bits.pop_front());
      nbits++;
    end
    prev_valid = rx_bit_valid;
  end

  // ---- stimulus ------------------------------------------------------------
  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    for (int s = 0; s < NSYM; s++) begin
      logic [BITS_PER_OFDM-1:0] bits;
      bits = {$urandom, $urandom};
      if (s % 8 == 7) n_gap_sym++;
      for (int b = 0; b < BITS_PER_OFDM; b++) begin
        while (s % 8 == 7 && ($urandom % 4) == 0) begin
          tx_bit_valid = 0;
          @(negedge clk);
        end
        tx_bit_valid = 1;
        tx_bit       = bits[BITS_PER_OFDM-1-b];
        exp_bits.push_back(tx_bit);
        @(negedge clk);
      end
      due.push_back(cycle + END2END);
    end
    tx_bit_valid = 0;
    repeat (150) @(negedge clk);

    checks++;
    if (nbits != BITS_PER_OFDM * NSYM) begin
      failures++;
      $display("FAIL received %0d bits of %0d", nbits, BITS_PER_OFDM * NSYM);
    end
    $display("S/P vectors %0d, IFFT runs %0d, FFT runs %0d", n_sp, n_ifft, n_fft);
    $display("prefix samples inserted %0d, removed %0d, clipped samples %0d", n_cp_ins, n_cp_rem, n_clip);
    $display("back-to-back output symbols %0d, symbols with idle input clocks %0d, bit errors %0d",
             n_b2b, n_gap_sym, bit_errors);
    checks++; if (n_sp != NSYM)   begin failures++; $display("FAIL S/P count"); end
    checks++; if (n_ifft != NSYM) begin failures++; $display("FAIL IFFT count"); end
    checks++; if (n_fft != NSYM)  begin failures++; $display("FAIL FFT count"); end
    checks++; if (n_cp_ins != NSYM * CP_LEN) begin failures++; $display("FAIL prefix inserted"); end
    checks++; if (n_cp_rem != NSYM * CP_LEN) begin failures++; $display("FAIL prefix removed"); end
    checks++; if (n_clip == 0)    begin failures++; $display("FAIL clipping never happened"); end
    checks++; if (n_b2b == 0)     begin failures++; $display("FAIL no back-to-back symbols"); end
    checks++; if (n_gap_sym == 0) begin failures++; $display("FAIL no idle input clocks"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
