// qam16_mapper: 16-QAM constellation encoder for one subcarrier.
//
// The four input bits b[3:0] select one of 16 points with I and Q in
// {-3, -1, +1, +3} (the 16-QAM row of the published I/Q value table). The bit
// labels follow the published constellation diagram: b[3:2] selects the I
// level and b[1:0] the Q level, each with 00 -> +3, 01 -> +1, 10 -> -1,
// 11 -> -3 (for example 0000 -> (+3,+3), 0110 -> (+1,-1), 1111 -> (-3,-3)).
// A level is output as level * AMP in a signed DW-bit word; AMP is this
// implementation's choice and leaves headroom for the transform.
// Purely combinational.
module qam16_mapper
  import ofdm_pkg::*;
#(
  parameter int AMP = QAM_UNIT  // sample value of constellation level 1
) (
  input  logic [BITS_PER_SYM-1:0] bits,
  output cplx_t                   point
);

  function automatic sample_t level(input logic [1:0] b);
    case (b)
      2'b00:   return sample_t'( 3 * AMP);
      2'b01:   return sample_t'( 1 * AMP);
      2'b10:   return sample_t'(-1 * AMP);
      default: return sample_t'(-3 * AMP);
    endcase
  endfunction

  always_comb begin
    point.re = level(bits[3:2]);
    point.im = level(bits[1:0]);
  end

endmodule
