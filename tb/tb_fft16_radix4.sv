// tb_fft16_radix4: random 16-sample vectors through the one-cycle FFT/IFFT.
// Each result is compared, after undoing the digit-reversed output order, with
// a direct floating-point DFT (forward, unscaled) or inverse DFT (scaled by
// 1/16). Also checks the one-clock latency, that out_valid follows in_valid,
// a forward/inverse round trip of a 16-QAM vector, and saturation.
module tb_fft16_radix4;
  import ofdm_pkg::*;
  import tb_ofdm_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, in_valid = 0, inverse = 0, out_valid;
  cplx_t x [N_FFT], y [N_FFT];

  fft16_radix4 dut (.clk(clk), .rst(rst), .in_valid(in_valid), .inverse(inverse),
                    .x(x), .out_valid(out_valid), .y(y));

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Apply x for one clock and return y in natural bin order.
  task automatic run(input bit inv, output real gr [N_FFT], output real gi [N_FFT]);
    @(negedge clk);
    inverse  = inv;
    in_valid = 1;
    @(negedge clk);
    in_valid = 0;
    checks++;
    if (out_valid !== 1'b1) begin
      failures++;
      $display("FAIL out_valid not high one clock after in_valid");
    end
    for (int q = 0; q < 4; q++)
      for (int k = 0; k < 4; k++) begin
        gr[q + 4*k] = real'(y[4*q + k].re);
        gi[q + 4*k] = real'(y[4*q + k].im);
      end
    @(negedge clk);
    checks++;
    if (out_valid !== 1'b0) begin
      failures++;
      $display("FAIL out_valid longer than one clock");
    end
  endtask

  task automatic compare(input bit inv, input real tol);
    real xr[], xi[], er[], ei[];
    real gr [N_FFT], gi [N_FFT];
    xr = new[N_FFT];
    xi = new[N_FFT];
    for (int n = 0; n < N_FFT; n++) begin
      xr[n] = real'(x[n].re);
      xi[n] = real'(x[n].im);
    end
    dft(xr, xi, inv, er, ei);
    run(inv, gr, gi);
    for (int k = 0; k < N_FFT; k++) begin
      checks++;
      if (rabs(gr[k] - er[k]) > tol || rabs(gi[k] - ei[k]) > tol) begin
        failures++;
        $display("FAIL inv=%0d bin %0d: got (%f,%f) expected (%f,%f)", inv, k, gr[k], gi[k],
                 er[k], ei[k]);
      end
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    // forward transform of random inputs small enough not to saturate
    for (int t = 0; t < 100; t++) begin
      for (int n = 0; n < N_FFT; n++) begin
        x[n].re = sample_t'(urand_range(-1400, 1400));
        x[n].im = sample_t'(urand_range(-1400, 1400));
      end
      compare(0, 12.0);
    end
    // inverse transform of full-range inputs
    for (int t = 0; t < 100; t++) begin
      for (int n = 0; n < N_FFT; n++) begin
        x[n].re = sample_t'(urand_range(-32768, 32767));
        x[n].im = sample_t'(urand_range(-32768, 32767));
      end
      compare(1, 4.0);
    end
    // single impulse in bin 5 -> tone; check the digit-reversed row directly
    for (int n = 0; n < N_FFT; n++) x[n] = '0;
    x[1].re = sample_t'(1000);
    begin
      real gr [N_FFT], gi [N_FFT];
      run(0, gr, gi);
      // x[n] = 1000 at n = 1 -> X[k] = 1000 e^{-j2pi k/16}; bin 1 lives in row 4
      checks++;
      if (y[4].re !== sample_t'(924) || y[4].im !== sample_t'(-383)) begin
        failures++;
        $display("FAIL impulse: row 4 = (%0d,%0d)", y[4].re, y[4].im);
      end
    end
    // saturation: a DC input of 30000 sums to 480000
    for (int n = 0; n < N_FFT; n++) begin
      x[n].re = sample_t'(30000);
      x[n].im = sample_t'(-30000);
    end
    begin
      real gr [N_FFT], gi [N_FFT];
      run(0, gr, gi);
      checks++;
      if (gr[0] != 32767.0 || gi[0] != -32768.0 || gr[1] != 0.0) begin
        failures++;
        $display("FAIL saturation: bin0 (%f,%f)", gr[0], gi[0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
