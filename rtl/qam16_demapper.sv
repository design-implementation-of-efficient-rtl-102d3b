// qam16_demapper: 16-QAM decoder (hard decision) for one subcarrier.
//
// Each received component is sliced against the decision thresholds 0 and
// +/-2*AMP, which picks the nearest of the levels {-3, -1, +1, +3} * AMP, and
// the level is turned back into the two bits that the constellation diagram
// gives it (+3 -> 00, +1 -> 01, -1 -> 10, -3 -> 11). The I decision gives
// bits[3:2], the Q decision bits[1:0]; this is the exact inverse of
// qam16_mapper. A sample lying on a threshold goes to the level above it
// (own choice). Purely combinational.
module qam16_demapper
  import ofdm_pkg::*;
#(
  parameter int AMP = QAM_UNIT  // sample value of constellation level 1
) (
  input  cplx_t                   point,
  output logic [BITS_PER_SYM-1:0] bits
);

  localparam sample_t THR = sample_t'(2 * AMP);

  function automatic logic [1:0] slice(input sample_t v);
    if (v >= THR)       return 2'b00;  // +3
    else if (v >= 0)    return 2'b01;  // +1
    else if (v >= -THR) return 2'b10;  // -1
    else                return 2'b11;  // -3
  endfunction

  always_comb begin
    bits[3:2] = slice(point.re);
    bits[1:0] = slice(point.im);
  end

endmodule
