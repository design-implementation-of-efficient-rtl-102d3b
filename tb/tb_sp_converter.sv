// tb_sp_converter: streams random bits, with random idle clocks between them,
// into the default 64-bit serial-to-parallel converter and into an 8-bit x 5
// instance. Each completed vector is compared with a model queue of the words
// sent, and out_valid is checked to rise exactly one clock after the last word.
module tb_sp_converter;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic v;
  logic [0:0] d1;
  logic [7:0] d8;
  logic ov1, ov8;
  logic [0:0] o1 [64];
  logic [7:0] o8 [5];

  sp_converter dut1 (.clk(clk), .rst(rst), .in_valid(v), .in_data(d1), .out_valid(ov1), .out_data(o1));
  sp_converter #(.W(8), .N(5)) dut8 (.clk(clk), .rst(rst), .in_valid(v), .in_data(d8),
                                     .out_valid(ov8), .out_data(o8));

  always #5 clk = ~clk;

  logic [0:0] q1 [$];
  logic [7:0] q8 [$];
  int exp1 = 0, exp8 = 0;   // expected out_valid this clock
  int vec1 = 0, vec8 = 0;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Sample outputs just before each rising edge.
  always @(negedge clk) if (!rst) begin
    checks++;
    if (ov1 !== (exp1 != 0) || ov8 !== (exp8 != 0)) begin
      failures++;
      $display("FAIL out_valid timing at %0t: %b/%b expected %0d/%0d", $time, ov1, ov8, exp1, exp8);
    end
    if (ov1) begin
      vec1++;
      for (int i = 0; i < 64; i++) begin
        checks++;
        if (o1[i] !== q1[i]) begin failures++; $display("FAIL 1-bit word %0d", i); end
      end
      repeat (64) void'(q1.pop_front());
    end
    if (ov8) begin
      vec8++;
      for (int i = 0; i < 5; i++) begin
        checks++;
        if (o8[i] !== q8[i]) begin failures++; $display("FAIL 8-bit word %0d", i); end
      end
      repeat (5) void'(q8.pop_front());
    end
    exp1 = 0;
    exp8 = 0;
    // drive next input
    v  = ($urandom % 4) != 0;
    d1 = 1'($urandom);
    d8 = 8'($urandom);
    if (v) begin
      q1.push_back(d1);
      q8.push_back(d8);
      if (q1.size() == 64) exp1 = 1;
      if (q8.size() == 5)  exp8 = 1;
    end
  end

  initial begin
    v = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 0;
    wait (vec1 == 20);
    @(negedge clk);
    checks++;
    if (vec8 < 250) begin failures++; $display("FAIL only %0d 8-bit vectors", vec8); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
