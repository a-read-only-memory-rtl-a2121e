// tb_rns_distributor: check of the distributor.
//
// Random and extreme signed 16-bit samples are applied; every residue must be
// the value r in 0..m-1 with x - r divisible by m, for m = 191, 193, 449
// (checked by stepping x by m into range, not with the % operator).
//
// What is checked comes from the original design where it specifies it
// (arithmetic, table contents, latency); everything else follows this
// implementation's own interface choices.
module tb_rns_distributor;
  import ntt_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0;
  int failures = 0;

  logic signed [15:0] x_re, x_im;
  rns_point_t         y;

  rns_distributor #(.DW(16)) dut (.*);

  function automatic int fold(input int x, input int m);
    while (x < 0) x += m;
    while (x >= m) x -= m;
    return x;
  endfunction

  task automatic chk(input int got, input int x, input int m);
    checks++;
    if (got != fold(x, m)) begin
      failures++;
      $display("FAIL: %0d mod %0d gave %0d", x, m, got);
    end
  endtask

  localparam int EXTREME [6] = '{-32768, 32767, 0, -1, -191, 448};

  initial begin
    for (int t = 0; t < 2000; t++) begin
      x_re = 16'($urandom); x_im = 16'($urandom);
      if (t < 6) begin x_re = 16'(EXTREME[t]); x_im = 16'(EXTREME[5 - t]); end
      @(posedge clk);
      chk(int'(y.f191.re), int'(x_re), 191);
      chk(int'(y.f191.im), int'(x_im), 191);
      chk(int'(y.f193.re), int'(x_re), 193);
      chk(int'(y.f193.im), int'(x_im), 193);
      chk(int'(y.f449.re), int'(x_re), 449);
      chk(int'(y.f449.im), int'(x_im), 449);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
