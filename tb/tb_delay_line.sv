// tb_delay_line: check of the latch delay chain.
//
// A random word stream enters a DEPTH = 3 chain and a DEPTH = 0 (wire) chain.
// The output of the first must equal the input of three cycles before, the
// second the present input.  Reset must clear the chain: the three outputs
// after reset are zero.
//
// What is checked comes from the original design where it specifies it
// (arithmetic, table contents, latency); everything else follows this
// implementation's own interface choices.
module tb_delay_line;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0;
  int failures = 0;

  logic [11:0] d, q3, q0;
  logic [11:0] hist [$];

  delay_line #(.W(12), .DEPTH(3)) u3 (.clk, .rst_n, .d(d), .q(q3));
  delay_line #(.W(12), .DEPTH(0)) u0 (.clk, .rst_n, .d(d), .q(q0));

  initial begin
    d = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 3; i++) hist.push_back('0);
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      d = 12'($urandom);
      hist.push_back(d);
      #1;
      checks++;
      if (q0 != d) begin failures++; $display("FAIL: wire output %h for %h", q0, d); end
      checks++;
      if (q3 != hist[0]) begin
        failures++;
        $display("FAIL cycle %0d: output %h expected %h", t, q3, hist[0]);
      end
      @(posedge clk);
      void'(hist.pop_front());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
