// tb_ofdm_ref_pkg: reference models for the OFDM testbenches, written
// independently of the RTL: a direct (not fast) floating-point DFT, the
// 16-QAM constellation copied point by point from the constellation diagram,
// and small helpers for comparing fixed-point results.
package tb_ofdm_ref_pkg;

  localparam real PI = 3.14159265358979323846;

  // Constellation diagram: label -> (I, Q) in units of the level-1 amplitude.
  function automatic void qam_point(input int label, output int i, output int q);
    case (label)
      'b0000: begin i =  3; q =  3; end
      'b0001: begin i =  3; q =  1; end
      'b0010: begin i =  3; q = -1; end
      'b0011: begin i =  3; q = -3; end
      'b0100: begin i =  1; q =  3; end
      'b0101: begin i =  1; q =  1; end
      'b0110: begin i =  1; q = -1; end
      'b0111: begin i =  1; q = -3; end
      'b1000: begin i = -1; q =  3; end
      'b1001: begin i = -1; q =  1; end
      'b1010: begin i = -1; q = -1; end
      'b1011: begin i = -1; q = -3; end
      'b1100: begin i = -3; q =  3; end
      'b1101: begin i = -3; q =  1; end
      'b1110: begin i = -3; q = -1; end
      default: begin i = -3; q = -3; end
    endcase
  endfunction

  // Direct N-point DFT. inv = 0: sum x[n] e^{-j2pi nk/N}.
  // inv = 1: (1/N) sum x[n] e^{+j2pi nk/N}.
  function automatic void dft(input real xr[], input real xi[], input bit inv,
                              output real yr[], output real yi[]);
    int n_pts = xr.size();
    real sgn = inv ? 1.0 : -1.0;
    yr = new[n_pts];
    yi = new[n_pts];
    for (int k = 0; k < n_pts; k++) begin
      real sr = 0.0, si = 0.0;
      for (int n = 0; n < n_pts; n++) begin
        real a = sgn * 2.0 * PI * real'(n * k) / real'(n_pts);
        sr += xr[n] * $cos(a) - xi[n] * $sin(a);
        si += xr[n] * $sin(a) + xi[n] * $cos(a);
      end
      yr[k] = inv ? sr / real'(n_pts) : sr;
      yi[k] = inv ? si / real'(n_pts) : si;
    end
  endfunction

  function automatic real rabs(input real v);
    return v < 0.0 ? -v : v;
  endfunction

  // Uniform random integer in [lo, hi].
  function automatic int urand_range(input int lo, input int hi);
    return lo + int'($urandom % (hi - lo + 1));
  endfunction

endpackage
