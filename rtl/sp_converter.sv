// sp_converter: serial-to-parallel converter.
//
// Collects N words of W bits, one per clock in which in_valid is high, and
// presents them together: out_data[0] is the first word received and
// out_data[N-1] the last. out_valid pulses for one clock, the clock after the
// N-th word arrives; out_data then holds until the next vector is complete.
// Words keep arriving without a gap: the next vector starts filling in the
// same clock in which out_valid is high. In the transmitter W = 1 and N = 64
// (the 64 bits of one OFDM symbol); in the receiver W is one complex sample
// and N = 16. The published design gives the function; the counter-and-
// register structure and the handshake are this implementation's choices.
// Synchronous active-high reset clears the word count.
module sp_converter #(
  parameter int W = 1,   // bits per word
  parameter int N = 64   // words per parallel vector
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         in_valid,
  input  logic [W-1:0] in_data,
  output logic         out_valid,
  output logic [W-1:0] out_data [N]
);

  localparam int CW = (N > 1) ? $clog2(N) : 1;

  logic [CW-1:0] count;
  logic [W-1:0]  buffer [N];

  always_ff @(posedge clk) begin
    if (rst) begin
      count     <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        buffer[count] <= in_data;
        if (count == CW'(N - 1)) begin
          count     <= '0;
          out_valid <= 1'b1;
        end else begin
          count <= count + 1'b1;
        end
      end
    end
  end

  // The completed vector: the last word is taken straight from the input.
  always_ff @(posedge clk) begin
    if (!rst && in_valid && count == CW'(N - 1)) begin
      for (int i = 0; i < N - 1; i++) out_data[i] <= buffer[i];
      out_data[N-1] <= in_data;
    end
  end

endmodule
