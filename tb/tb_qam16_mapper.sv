// tb_qam16_mapper: applies all 16 labels to the 16-QAM encoder and compares
// each output with the point read off the constellation diagram, at the
// default amplitude and (second instance) at a different amplitude.
module tb_qam16_mapper;
  import ofdm_pkg::*;
  import tb_ofdm_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [3:0] bits;
  cplx_t point, point_b;

  qam16_mapper dut (.bits(bits), .point(point));
  qam16_mapper #(.AMP(100)) dut_b (.bits(bits), .point(point_b));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int l = 0; l < 16; l++) begin
      int ei, eq;
      bits = 4'(l);
      #1;
      qam_point(l, ei, eq);
      checks++;
      if (point.re !== sample_t'(ei * QAM_UNIT) || point.im !== sample_t'(eq * QAM_UNIT)) begin
        failures++;
        $display("FAIL label %b: got (%0d,%0d) expected (%0d,%0d)", bits, point.re, point.im,
                 ei * QAM_UNIT, eq * QAM_UNIT);
      end
      checks++;
      if (point_b.re !== sample_t'(ei * 100) || point_b.im !== sample_t'(eq * 100)) begin
        failures++;
        $display("FAIL AMP=100 label %b", bits);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
