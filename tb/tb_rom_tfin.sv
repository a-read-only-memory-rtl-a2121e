// tb_rom_tfin: check of the reconstruction tables (TFIN).
//
// Signed tables (differences): every d in -(M-1)..M-1 is applied as the pair
// (d mod 30, d mod 31) and must come back as d mod M.  Unsigned tables (sums):
// every s in 0..2M-2 must come back as s mod M.  Primes 193 and 449 are
// tested; for 449 sums and negative differences share sub-residue pairs,
// which is why the two kinds of table differ.
//
// What is checked comes from the original design where it specifies it
// (arithmetic, table contents, latency); everything else follows this
// implementation's own interface choices.
module tb_rom_tfin;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0;
  int failures = 0;

  localparam int MV [4] = '{193, 193, 449, 449};
  localparam bit SG [4] = '{1'b1, 1'b0, 1'b1, 1'b0};

  logic [4:0] r0, r1;
  logic [8:0] data [4];

  for (genvar i = 0; i < 4; i++) begin : g_dut
    rom_tfin #(.M(MV[i]), .SIGNED(SG[i])) u (.r0(r0), .r1(r1), .data(data[i]));
  end

  function automatic int md(input int x, input int m);
    int r;
    r = x % m;
    return (r < 0) ? r + m : r;
  endfunction

  initial begin
    for (int i = 0; i < 4; i++) begin
      int lo, hi;
      lo = SG[i] ? -(MV[i] - 1) : 0;
      hi = SG[i] ? MV[i] - 1 : 2 * MV[i] - 2;
      for (int v = lo; v <= hi; v++) begin
        r0 = 5'(md(v, 30)); r1 = 5'(md(v, 31));
        @(posedge clk);
        checks++;
        if (int'(data[i]) != md(v, MV[i])) begin
          failures++;
          $display("FAIL M=%0d signed=%0d value %0d: got %0d", MV[i], SG[i], v, data[i]);
        end
      end
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
