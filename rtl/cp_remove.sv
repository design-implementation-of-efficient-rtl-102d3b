// cp_remove: guard-interval (cyclic-prefix) removal.
//
// Counts the received samples in frames of N + CP and discards the first CP
// of each frame, the cyclic prefix, passing the N samples of the symbol on.
// Frame alignment is taken from reset: the first sample after reset is the
// first prefix sample of a frame (symbol synchronisation is outside this
// design). The published design names the block and draws the prefix samples
// dropped; the counter, the alignment rule and the registered output are this
// implementation's choices.
//
// Timing: each kept sample appears on out_data with out_valid one clock after
// it was received; out_last marks the last sample of a symbol.
// Synchronous active-high reset.
module cp_remove
  import ofdm_pkg::*;
#(
  parameter int N  = N_FFT,   // samples per symbol
  parameter int CP = CP_LEN   // cyclic-prefix length
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  in_valid,
  input  cplx_t in_data,
  output logic  out_valid,
  output logic  out_last,
  output cplx_t out_data
);

  localparam int OW = $clog2(N + CP);

  logic [OW-1:0] count;

  always_ff @(posedge clk) begin
    if (rst) begin
      count     <= '0;
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= in_valid && count >= OW'(CP);
      out_last  <= in_valid && count == OW'(N + CP - 1);
      if (in_valid) begin
        out_data <= in_data;
        count    <= (count == OW'(N + CP - 1)) ? '0 : count + 1'b1;
      end
    end
  end

endmodule
