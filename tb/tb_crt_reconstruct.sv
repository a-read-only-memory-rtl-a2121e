// tb_crt_reconstruct: check of the reconstruction stage.
//
// Random signed integers over the whole range -(M-1)/2 .. (M-1)/2,
// M = 191*193*449, plus the end points and small values, are split into their
// residues here and fed in one per cycle; the stage must return the integer
// one cycle later with out_valid set.
//
// What is checked comes from the original design where it specifies it
// (arithmetic, table contents, latency); everything else follows this
// implementation's own interface choices.
module tb_crt_reconstruct;
  import ntt_pkg::*;
  localparam int MM = 191 * 193 * 449;
  localparam int HALF = (MM - 1) / 2;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0;
  int failures = 0;

  logic                 in_valid, out_valid;
  rns_point_t           x;
  logic signed [OW-1:0] y_re, y_im;

  crt_reconstruct dut (.*);

  function automatic int md(input int v, input int m);
    int r;
    r = v % m;
    return (r < 0) ? r + m : r;
  endfunction

  int exp_re [$], exp_im [$];

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      int er, ei;
      er = exp_re.pop_front();
      ei = exp_im.pop_front();
      checks++;
      if (int'(y_re) != er || int'(y_im) != ei) begin
        failures++;
        $display("FAIL: got %0d %0d expected %0d %0d", y_re, y_im, er, ei);
      end
    end
  end

  localparam int EDGE [6] = '{HALF, -HALF, 0, -1, 1, 86657};

  initial begin
    in_valid = 1'b0; x = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      int vr, vi;
      @(negedge clk);
      vr = int'($urandom_range(MM - 1)) - HALF;
      vi = int'($urandom_range(2000)) - 1000;
      if (t < 6) begin vr = EDGE[t]; vi = EDGE[5 - t]; end
      in_valid = ($urandom_range(7) != 0);
      x.f191.re = 9'(md(vr, 191)); x.f193.re = 9'(md(vr, 193)); x.f449.re = 9'(md(vr, 449));
      x.f191.im = 9'(md(vi, 191)); x.f193.im = 9'(md(vi, 193)); x.f449.im = 9'(md(vi, 449));
      if (in_valid) begin exp_re.push_back(vr); exp_im.push_back(vi); end
    end
    @(negedge clk);
    in_valid = 1'b0;
    @(negedge clk);
    checks++;
    if (exp_re.size() != 0) begin
      failures++;
      $display("FAIL: %0d results missing", exp_re.size());
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
