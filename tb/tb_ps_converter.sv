// tb_ps_converter: loads random vectors into the default 64 x 1-bit
// parallel-to-serial converter and a 6 x 8-bit instance, sometimes
// back to back (load in the clock of the last word) and sometimes with a gap,
// and checks that every word comes out in order, one per clock, starting the
// clock after load, with out_valid low only in the gaps.
module tb_ps_converter;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic load1 = 0, load8 = 0;
  logic [0:0] in1 [64];
  logic [7:0] in8 [6];
  logic rdy1, rdy8, ov1, ov8;
  logic [0:0] o1;
  logic [7:0] o8;
  int back_to_back = 0;

  ps_converter dut1 (.clk(clk), .rst(rst), .load(load1), .in_data(in1), .ready(rdy1),
                     .out_valid(ov1), .out_data(o1));
  ps_converter #(.W(8), .N(6)) dut8 (.clk(clk), .rst(rst), .load(load8), .in_data(in8),
                                     .ready(rdy8), .out_valid(ov8), .out_data(o8));

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // 8-bit instance: expected output queue, checked every clock.
  logic [7:0] exp8 [$];
  always @(negedge clk) if (!rst) begin
    checks++;
    if (ov8 !== (exp8.size() != 0)) begin
      failures++;
      $display("FAIL 8-bit out_valid %b with %0d pending at %0t", ov8, exp8.size(), $time);
    end else if (ov8) begin
      checks++;
      if (o8 !== exp8[0]) begin failures++; $display("FAIL 8-bit word %h != %h", o8, exp8[0]); end
      void'(exp8.pop_front());
    end
    load8 = 0;
    if (rdy8 && ($urandom % 2)) begin
      if (ov8) back_to_back++;
      load8 = 1;
      for (int i = 0; i < 6; i++) begin
        in8[i] = 8'($urandom);
        exp8.push_back(in8[i]);
      end
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    // 1-bit, 64-word instance: three vectors, the second two back to back
    for (int vct = 0; vct < 3; vct++) begin
      logic [0:0] sent [64];
      @(negedge clk);
      for (int i = 0; i < 64; i++) begin in1[i] = 1'($urandom); sent[i] = in1[i]; end
      checks++;
      if (!rdy1) begin failures++; $display("FAIL not ready"); end
      while (!rdy1) @(negedge clk);
      load1 = 1;
      @(negedge clk);
      load1 = 0;
      for (int i = 0; i < 64; i++) begin
        checks++;
        if (ov1 !== 1'b1 || o1 !== sent[i]) begin
          failures++;
          $display("FAIL vector %0d bit %0d", vct, i);
        end
        if (i == 62 && vct >= 1 && vct < 2) begin
          // next load happens while the last bit is out: ready must be high
          @(negedge clk);
          checks++;
          if (!rdy1 || o1 !== sent[63]) begin failures++; $display("FAIL ready at last bit"); end
          while (!rdy1) @(negedge clk);
          for (int j = 0; j < 64; j++) in1[j] = 1'($urandom);
          sent = in1;
          load1 = 1;
          @(negedge clk);
          load1 = 0;
          i = -1;
          vct++;
          continue;
        end
        if (i < 63) @(negedge clk);
      end
      @(negedge clk);
      checks++;
      if (ov1 !== 1'b0) begin failures++; $display("FAIL out_valid after last bit"); end
    end
    repeat (300) @(negedge clk);
    checks++;
    if (back_to_back == 0) begin failures++; $display("FAIL no back-to-back load"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
