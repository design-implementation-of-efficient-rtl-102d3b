// tb_ofdm_tx: sends random bits (continuously for some symbols, with idle
// clocks for others) into the transmitter. For each 64-bit symbol the
// expected output is built independently: 4-bit labels (first bit most
// significant) -> constellation points -> floating-point inverse DFT / 16 ->
// last CP_LEN samples followed by all 16. Every output sample must match to
// within a few LSBs, the N_FFT + CP_LEN samples must be consecutive, and the
// first must appear 18 clocks after the clock edge that took the last bit.
module tb_ofdm_tx;
  import ofdm_pkg::*;
  import tb_ofdm_ref_pkg::*;

  localparam int NSYM = 12;
  localparam int LATENCY = 18;

  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, bit_in = 0, bit_valid = 0, out_valid;
  cplx_t out_data;

  ofdm_tx dut (.clk(clk), .rst(rst), .bit_in(bit_in), .bit_valid(bit_valid),
               .out_valid(out_valid), .out_data(out_data));

  always #5 clk = ~clk;

  real exp_re [$], exp_im [$];
  int  cycle = 0;
  int  due [$];        // cycle in which each symbol's first sample is due
  int  seen_syms = 0;
  int  run_len = 0;
  int  prefix_samples = 0;

  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Output checker, sampled mid-cycle.
  always @(negedge clk) if (!rst) begin
    if (out_valid) begin
      if (run_len == 0) begin
        checks++;
        if (due.size() == 0 || cycle != due[0]) begin
          failures++;
          $display("FAIL symbol %0d starts in cycle %0d, due %0d", seen_syms, cycle,
                   due.size() ? due[0] : -1);
        end
        if (due.size()) void'(due.pop_front());
      end
      if (run_len < CP_LEN) prefix_samples++;
      run_len++;
      checks++;
      if (exp_re.size() == 0 ||
          rabs(real'(out_data.re) - exp_re[0]) > 3.0 || rabs(real'(out_data.im) - exp_im[0]) > 3.0) begin
        failures++;
        $display("FAIL sample: got (%0d,%0d) expected (%f,%f)", out_data.re, out_data.im,
                 exp_re.size() ? exp_re[0] : 0.0, exp_im.size() ? exp_im[0] : 0.0);
      end
      if (exp_re.size()) begin void'(exp_re.pop_front()); void'(exp_im.pop_front()); end
    end else if (run_len != 0) begin
      checks++;
      if (run_len != N_FFT + CP_LEN) begin failures++; $display("FAIL run of %0d samples", run_len); end
      run_len = 0;
      seen_syms++;
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    for (int s = 0; s < NSYM; s++) begin
      logic [63:0] bits;
      real xr[], xi[], yr[], yi[];
      bits = {$urandom, $urandom};
      xr = new[N_FFT];
      xi = new[N_FFT];
      for (int k = 0; k < N_FFT; k++) begin
        int li, lq;
        qam_point({bits[63-4*k], bits[62-4*k], bits[61-4*k], bits[60-4*k]}, li, lq);
        xr[k] = real'(li * QAM_UNIT);
        xi[k] = real'(lq * QAM_UNIT);
      end
      dft(xr, xi, 1'b1, yr, yi);
      for (int n = N_FFT - CP_LEN; n < N_FFT; n++) begin exp_re.push_back(yr[n]); exp_im.push_back(yi[n]); end
      for (int n = 0; n < N_FFT; n++) begin exp_re.push_back(yr[n]); exp_im.push_back(yi[n]); end
      for (int b = 0; b < 64; b++) begin
        // odd symbols get random idle clocks between bits
        while (s % 2 == 1 && ($urandom % 3) == 0) begin
          bit_valid = 0;
          @(negedge clk);
        end
        bit_valid = 1;
        bit_in    = bits[63-b];
        @(negedge clk);
      end
      // the last bit was taken at the edge just passed; output due LATENCY edges later
      due.push_back(cycle + LATENCY);
    end
    bit_valid = 0;
    repeat (60) @(negedge clk);
    checks++;
    if (seen_syms != NSYM) begin failures++; $display("FAIL %0d of %0d symbols", seen_syms, NSYM); end
    $display("symbols %0d, cyclic prefix samples %0d", seen_syms, prefix_samples);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
