// tb_cp_remove: streams frames of N + CP random samples, with random idle
// clocks, into the cyclic-prefix remover and checks that exactly the last N
// samples of every frame come out, in order, one clock after they went in,
// with out_last on the last sample of each symbol.
module tb_cp_remove;
  import ofdm_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, in_valid = 0, out_valid, out_last;
  cplx_t in_data, out_data;
  int dropped = 0, kept = 0;

  cp_remove dut (.clk(clk), .rst(rst), .in_valid(in_valid), .in_data(in_data),
                 .out_valid(out_valid), .out_last(out_last), .out_data(out_data));

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic  exp_v, exp_l;
  cplx_t exp_d;
  int pos = 0;

  // Outputs are checked one time unit after the clock edge that took the input.
  task automatic check_out();
    checks++;
    if (out_valid !== exp_v || out_last !== exp_l || (exp_v && out_data !== exp_d)) begin
      failures++;
      $display("FAIL at %0t: valid %b/%b last %b/%b", $time, out_valid, exp_v, out_last, exp_l);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 2000; t++) begin
      in_valid = ($urandom % 3) != 0;
      in_data  = cplx_t'($urandom);
      exp_v = in_valid && pos >= CP_LEN;
      exp_l = in_valid && pos == N_FFT + CP_LEN - 1;
      exp_d = in_data;
      if (in_valid) begin
        if (pos < CP_LEN) dropped++; else kept++;
        pos = (pos == N_FFT + CP_LEN - 1) ? 0 : pos + 1;
      end
      @(posedge clk);
      #1 check_out();
      @(negedge clk);
    end
    in_valid = 0;
    checks++;
    // whole frames were sent when pos = 0: kept : dropped = N : CP
    if (pos != 0 ? (dropped == 0) : (kept * CP_LEN != dropped * N_FFT)) begin
      failures++;
      $display("FAIL ratio kept %0d dropped %0d", kept, dropped);
    end
    $display("prefix samples dropped: %0d, kept: %0d", dropped, kept);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
