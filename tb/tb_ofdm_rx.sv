// tb_ofdm_rx: builds OFDM symbols in the testbench (random bits -> labels ->
// constellation points -> floating-point inverse DFT / 16, rounded, with the
// last CP_LEN samples repeated in front) and sends them to the receiver, one
// symbol every 64 clocks, some with small random offsets added to every
// sample. The decoded bit stream must equal the bits sent, and each symbol's
// first bit must appear 3 clocks after the edge that took its last sample.
module tb_ofdm_rx;
  import ofdm_pkg::*;
  import tb_ofdm_ref_pkg::*;

  localparam int NSYM = 12;
  localparam int LATENCY = 3;
  localparam int PERIOD = 64;

  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, in_valid = 0, bit_out, bit_valid;
  cplx_t in_data;

  ofdm_rx dut (.clk(clk), .rst(rst), .in_valid(in_valid), .in_data(in_data),
               .bit_out(bit_out), .bit_valid(bit_valid));

  always #5 clk = ~clk;

  logic exp_bits [$];
  int   cycle = 0;
  int   due [$];
  int   nbits = 0;
  logic prev_valid = 0;
  int   back_to_back = 0;

  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (!rst) begin
    if (bit_valid) begin
      if (nbits % 64 == 0) begin
        checks++;
        if (due.size() == 0 || cycle != due[0]) begin
          failures++;
          $display("FAIL symbol starts in cycle %0d, due %0d", cycle, due.size() ? due[0] : -1);
        end
        if (due.size()) void'(due.pop_front());
        if (prev_valid) back_to_back++;
      end
      checks++;
      if (exp_bits.size() == 0 || bit_out !== exp_bits[0]) begin
        failures++;
        $display("FAIL bit %0d", nbits);
      end
      if (exp_bits.size()) void'(exp_bits.pop_front());
      nbits++;
    end
    prev_valid = bit_valid;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    for (int s = 0; s < NSYM; s++) begin
      logic [63:0] bits;
      real xr[], xi[], yr[], yi[];
      int t0;
      t0 = cycle;
      bits = {$urandom, $urandom};
      xr = new[N_FFT];
      xi = new[N_FFT];
      for (int k = 0; k < N_FFT; k++) begin
        int li, lq;
        qam_point({bits[63-4*k], bits[62-4*k], bits[61-4*k], bits[60-4*k]}, li, lq);
        xr[k] = real'(li * QAM_UNIT);
        xi[k] = real'(lq * QAM_UNIT);
      end
      for (int b = 0; b < 64; b++) exp_bits.push_back(bits[63-b]);
      dft(xr, xi, 1'b1, yr, yi);
      for (int p = 0; p < N_FFT + CP_LEN; p++) begin
        automatic int n = (p < CP_LEN) ? N_FFT - CP_LEN + p : p - CP_LEN;
        automatic int noise_re = (s % 3 == 2) ? urand_range(-30, 30) : 0;
        automatic int noise_im = (s % 3 == 2) ? urand_range(-30, 30) : 0;
        in_valid = 1;
        in_data.re = sample_t'($rtoi(yr[n] + (yr[n] < 0 ? -0.5 : 0.5)) + noise_re);
        in_data.im = sample_t'($rtoi(yi[n] + (yi[n] < 0 ? -0.5 : 0.5)) + noise_im);
        @(negedge clk);
      end
      in_valid = 0;
      due.push_back(cycle + LATENCY);
      while (cycle < t0 + PERIOD) @(negedge clk);
    end
    repeat (PERIOD + 10) @(negedge clk);
    checks++;
    if (nbits != 64 * NSYM) begin failures++; $display("FAIL %0d bits of %0d", nbits, 64 * NSYM); end
    checks++;
    if (back_to_back == 0) begin failures++; $display("FAIL bit stream never back to back"); end
    $display("bits %0d, back-to-back symbols %0d", nbits, back_to_back);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
