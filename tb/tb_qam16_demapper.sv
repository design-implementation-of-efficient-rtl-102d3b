// tb_qam16_demapper: feeds each constellation point with random offsets of
// less than one level-1 amplitude in I and Q (inside the decision region) and
// checks that the original label comes back; also checks points exactly on
// the thresholds and far outside the constellation.
module tb_qam16_demapper;
  import ofdm_pkg::*;
  import tb_ofdm_ref_pkg::*;

  int checks = 0, failures = 0;
  cplx_t point;
  logic [3:0] bits;

  qam16_demapper dut (.point(point), .bits(bits));

  task automatic expect_bits(input int re, input int im, input logic [3:0] exp_bits);
    point.re = sample_t'(re);
    point.im = sample_t'(im);
    #1;
    checks++;
    if (bits !== exp_bits) begin
      failures++;
      $display("FAIL (%0d,%0d): got %b expected %b", re, im, bits, exp_bits);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int l = 0; l < 16; l++) begin
      int ei, eq;
      qam_point(l, ei, eq);
      expect_bits(ei * QAM_UNIT, eq * QAM_UNIT, 4'(l));
      for (int r = 0; r < 50; r++)
        expect_bits(ei * QAM_UNIT + urand_range(-QAM_UNIT + 1, QAM_UNIT - 1),
                    eq * QAM_UNIT + urand_range(-QAM_UNIT + 1, QAM_UNIT - 1), 4'(l));
    end
    // thresholds go to the level above; far outside saturates to the edge
    expect_bits(0, 0, 4'b0101);
    expect_bits(2 * QAM_UNIT, -2 * QAM_UNIT, 4'b0010);
    expect_bits(-2 * QAM_UNIT - 1, 2 * QAM_UNIT - 1, 4'b1101);
    expect_bits(-30000, 30000, 4'b1100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
