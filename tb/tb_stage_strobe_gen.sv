// tb_stage_strobe_gen: check of the stage strobe generator.
//
// After reset the counter must count 0..15 and wrap.  Each clock at most one
// strobe is high; strobe k (stage k + 1) must be high exactly when the count
// one clock earlier was 2*(4 - k), so within one 16-clock period the strobes
// come in the order stage 5, 4, 3, 2, 1, two clocks apart.
//
// What is checked comes from the original design where it specifies it
// (arithmetic, table contents, latency); everything else follows this
// implementation's own interface choices.
module tb_stage_strobe_gen;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0;
  int failures = 0;

  logic [3:0] count;
  logic [4:0] strobe;

  stage_strobe_gen dut (.*);

  int order [$];

  initial begin
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (count != 0 || strobe != 0) begin failures++; $display("FAIL: not cleared by reset"); end
    rst_n = 1'b1;
    for (int t = 0; t < 200; t++) begin
      @(posedge clk);
      #1;
      checks++;
      if (int'(count) != (t + 1) % 16) begin
        failures++;
        $display("FAIL: count %0d at clock %0d", count, t);
      end
      for (int k = 0; k < 5; k++) begin
        bit exp;
        exp = ((t % 16) == 2 * (4 - k));   // count before this edge
        checks++;
        if (strobe[k] != exp) begin
          failures++;
          $display("FAIL: strobe of stage %0d is %0d after count %0d", k + 1, strobe[k], t % 16);
        end
        if (strobe[k] && t < 16) order.push_back(k + 1);
      end
      checks++;
      if ($countones(strobe) > 1) begin failures++; $display("FAIL: two strobes at once"); end
    end
    checks++;
    if (order != '{5, 4, 3, 2, 1}) begin
      failures++;
      $display("FAIL: strobe order %p", order);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
