// tb_cp_insert: sends OFDM symbols of 16 random complex samples into the
// cyclic-prefix inserter and checks the N + CP output samples (the last CP
// input samples, then all N) and their timing: out_valid rises the clock
// after the last input sample and stays high for N + CP clocks. The next
// symbol starts arriving as soon as the buffer allows.
module tb_cp_insert;
  import ofdm_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, in_valid = 0, busy, out_valid;
  cplx_t in_data, out_data;

  cp_insert dut (.clk(clk), .rst(rst), .in_valid(in_valid), .in_data(in_data), .busy(busy),
                 .out_valid(out_valid), .out_data(out_data));

  always #5 clk = ~clk;

  cplx_t exp_q [$];
  int prefix_samples = 0;
  int overlapped = 0;
  int burst = 0;
  logic last_in = 0;

  // out_valid must rise the clock after the last input sample and stay high
  // for exactly N + CP clocks.
  always @(negedge clk) if (!rst) begin
    if (out_valid) burst++;
    if (!out_valid && burst != 0) begin
      checks++;
      if (burst != N_FFT + CP_LEN) begin failures++; $display("FAIL burst %0d clocks", burst); end
      burst = 0;
    end
    if (last_in) begin
      checks++;
      if (!out_valid || burst != 1) begin failures++; $display("FAIL out_valid late"); end
    end
  end

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (!rst && out_valid) begin
    checks++;
    if (exp_q.size() == 0 || out_data !== exp_q[0]) begin
      failures++;
      $display("FAIL output sample at %0t", $time);
    end
    if (exp_q.size() != 0) void'(exp_q.pop_front());
  end

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    for (int s = 0; s < 10; s++) begin
      cplx_t sym [N_FFT];
      for (int n = 0; n < N_FFT; n++) sym[n] = cplx_t'($urandom);
      for (int n = N_FFT - CP_LEN; n < N_FFT; n++) begin exp_q.push_back(sym[n]); prefix_samples++; end
      for (int n = 0; n < N_FFT; n++) exp_q.push_back(sym[n]);
      // start the next symbol as soon as the previous prefix is out and its
      // body is being read (overlapping input and output)
      while (busy && exp_q.size() > N_FFT - 1 + (N_FFT + CP_LEN)) @(negedge clk);
      if (busy) overlapped++;
      for (int n = 0; n < N_FFT; n++) begin
        in_valid = 1;
        in_data  = sym[n];
        @(posedge clk);
        last_in = (n == N_FFT - 1);
        @(negedge clk);
      end
      in_valid = 0;
      @(posedge clk);
      last_in = 0;
      @(negedge clk);
      in_valid = 0;
    end
    wait (!busy);
    @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d samples missing", exp_q.size()); end
    checks++;
    if (overlapped == 0) begin failures++; $display("FAIL input never overlapped output"); end
    $display("cyclic prefix samples sent: %0d, overlapped symbols: %0d", prefix_samples, overlapped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
