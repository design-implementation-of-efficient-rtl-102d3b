// tb_radix4_butterfly: drives random complex inputs into butterflies with
// different twiddle exponents, in forward and inverse mode, and compares every
// output with the butterfly equations evaluated in floating point
// (W = e^{-j2pi K/16} forward, e^{+j2pi K/16} inverse, j -> -j for inverse).
module tb_radix4_butterfly;
  import tb_ofdm_ref_pkg::*;

  localparam int W = 16;
  int checks = 0, failures = 0;
  logic inverse;
  logic signed [W-1:0] p_re [4], p_im [4];
  logic signed [W+2:0] a_re [4], a_im [4], b_re [4], b_im [4];

  radix4_butterfly dut_a (.inverse(inverse), .p_re(p_re), .p_im(p_im), .x_re(a_re), .x_im(a_im));
  radix4_butterfly #(.W(W), .K1(3), .K2(6), .K3(9))
    dut_b (.inverse(inverse), .p_re(p_re), .p_im(p_im), .x_re(b_re), .x_im(b_im));

  task automatic check_bf(input int k1, input int k2, input int k3,
                          input logic signed [W+2:0] gr [4], input logic signed [W+2:0] gi [4]);
    real tr [4], ti [4];
    int ks [4];
    real sg = inverse ? 1.0 : -1.0;
    ks = '{0, k1, k2, k3};
    for (int i = 0; i < 4; i++) begin
      real a = sg * 2.0 * PI * real'(ks[i]) / 16.0;
      tr[i] = real'(p_re[i]) * $cos(a) - real'(p_im[i]) * $sin(a);
      ti[i] = real'(p_re[i]) * $sin(a) + real'(p_im[i]) * $cos(a);
    end
    // X_m = sum_i T_i * (-j)^(m*i) forward, (+j)^(m*i) inverse
    for (int m = 0; m < 4; m++) begin
      real xr = 0.0, xi = 0.0;
      for (int i = 0; i < 4; i++) begin
        real a = sg * 2.0 * PI * real'(m * i) / 4.0;
        xr += tr[i] * $cos(a) - ti[i] * $sin(a);
        xi += tr[i] * $sin(a) + ti[i] * $cos(a);
      end
      checks++;
      if (rabs(real'(gr[m]) - xr) > 8.0 || rabs(real'(gi[m]) - xi) > 8.0) begin
        failures++;
        $display("FAIL K=(%0d,%0d,%0d) inv=%0d X%0d: got (%0d,%0d) expected (%f,%f)",
                 k1, k2, k3, inverse, m, gr[m], gi[m], xr, xi);
      end
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 400; t++) begin
      inverse = t[0];
      for (int i = 0; i < 4; i++) begin
        p_re[i] = W'(urand_range(-32768, 32767));
        p_im[i] = W'(urand_range(-32768, 32767));
      end
      #1;
      check_bf(0, 0, 0, a_re, a_im);
      check_bf(3, 6, 9, b_re, b_im);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
