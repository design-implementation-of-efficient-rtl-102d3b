// cp_insert: guard-interval (cyclic-prefix) insertion.
//
// Receives the N samples of one OFDM symbol as a stream (one per clock with
// in_valid high) and writes them into an N-entry buffer. After the N-th sample
// it sends N + CP samples: first the last CP samples of the symbol (indices
// N-CP .. N-1), then the whole symbol (indices 0 .. N-1). The repeated tail
// lets the receiver discard a guard interval that absorbs multipath echoes of
// the previous symbol. The published design names the block and draws the
// tail copied in front of the symbol; the prefix length, the buffer and the
// streaming handshake are this implementation's choices.
//
// Timing: out_valid is high for N + CP consecutive clocks, starting the clock
// after the N-th input sample. The next symbol may start arriving once the
// prefix has been sent and must not complete before the previous output ends
// (busy low); an assertion checks that no sample arrives while the buffer is
// still needed. Synchronous active-high reset.
module cp_insert
  import ofdm_pkg::*;
#(
  parameter int N  = N_FFT,   // samples per symbol
  parameter int CP = CP_LEN   // cyclic-prefix length, 0 < CP < N
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  in_valid,
  input  cplx_t in_data,
  output logic  busy,        // still sending the previous symbol
  output logic  out_valid,
  output cplx_t out_data
);

  localparam int NW = $clog2(N);
  localparam int OW = $clog2(N + CP);

  cplx_t         buffer [N];
  logic [NW-1:0] wr_count;
  logic [OW-1:0] rd_count;   // position within the N + CP output samples
  logic [NW-1:0] rd_index;

  assign busy = out_valid;

  // Output position p maps to buffer index N-CP+p (prefix) or p-CP (body).
  assign rd_index = (rd_count < OW'(CP)) ? NW'(rd_count + OW'(N - CP))
                                         : NW'(rd_count - OW'(CP));
  assign out_data = buffer[rd_index];

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_count  <= '0;
      rd_count  <= '0;
      out_valid <= 1'b0;
    end else begin
      if (in_valid) begin
        buffer[wr_count] <= in_data;
        wr_count <= (wr_count == NW'(N - 1)) ? '0 : wr_count + 1'b1;
      end
      if (in_valid && wr_count == NW'(N - 1)) begin
        out_valid <= 1'b1;
        rd_count  <= '0;
      end else if (out_valid) begin
        if (rd_count == OW'(N + CP - 1)) begin
          out_valid <= 1'b0;
          rd_count  <= '0;
        end else begin
          rd_count <= rd_count + 1'b1;
        end
      end
    end
  end

  // A new sample may overwrite buffer entry i only once entry i has been sent
  // for the last time, i.e. once the body read position has passed it.
  a_no_overwrite: assert property (@(posedge clk) disable iff (rst)
      (in_valid && out_valid) |-> (rd_count >= OW'(CP) && rd_index >= wr_count))
    else $error("cp_insert: next symbol overwrites samples not yet sent");

endmodule
