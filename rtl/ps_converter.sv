// ps_converter: parallel-to-serial converter.
//
// On a clock with load high it takes N words of W bits and then sends them
// one per clock, in_data[0] first: out_valid is high for N consecutive clocks
// starting the clock after load. ready is high when a new vector may be
// loaded, which includes the clock in which the last word of the previous
// vector is on the output, so back-to-back vectors leave no gap. Loading
// while ready is low is a protocol error caught by an assertion. In the
// transmitter the words are the 16 complex IFFT outputs; in the receiver
// W = 1 and N = 64 bits of decoded data. The published design gives the
// function; the structure and the handshake are this implementation's
// choices. Synchronous active-high reset empties the converter.
module ps_converter #(
  parameter int W = 1,   // bits per word
  parameter int N = 64   // words per parallel vector
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         load,
  input  logic [W-1:0] in_data [N],
  output logic         ready,
  output logic         out_valid,
  output logic [W-1:0] out_data
);

  localparam int CW = (N > 1) ? $clog2(N) : 1;

  logic [W-1:0]  buffer [N];
  logic [CW-1:0] index;

  assign ready    = !out_valid || index == CW'(N - 1);
  assign out_data = buffer[index];

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      index     <= '0;
    end else if (load) begin
      out_valid <= 1'b1;
      index     <= '0;
    end else if (out_valid) begin
      if (index == CW'(N - 1)) begin
        out_valid <= 1'b0;
        index     <= '0;
      end else begin
        index <= index + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (load) buffer <= in_data;
  end

  a_no_overrun: assert property (@(posedge clk) disable iff (rst) load |-> ready)
    else $error("ps_converter: vector loaded while the previous one is still being sent");

endmodule
