// tb_rom_tsuin: check of the reconstruction-index tables (TSUIN).
//
// Every difference d in -(M-1)..M-1 is applied as (d mod 30, d mod 31).  The
// pair of outputs (index mod 30, index mod 31) must identify an exponent k in
// 0..M-2 with g^k = d (mod M), checked by raising g to k by repeated
// multiplication; d = 0 must give 31 on both.  Primes 193 (g = 5),
// 191 (g = 19) and 449 (g = 3) are tested.
//
// What is checked comes from the original design where it specifies it
// (arithmetic, table contents, latency); everything else follows this
// implementation's own interface choices.
module tb_rom_tsuin;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0;
  int failures = 0;

  localparam int MV [3] = '{193, 191, 449};
  localparam int GV [3] = '{5, 19, 3};

  logic [4:0] r0, r1;
  logic [4:0] i0 [3], i1 [3];

  for (genvar i = 0; i < 3; i++) begin : g_dut
    rom_tsuin #(.M(MV[i]), .G(GV[i]), .MS(30)) u0 (.r0(r0), .r1(r1), .data(i0[i]));
    rom_tsuin #(.M(MV[i]), .G(GV[i]), .MS(31)) u1 (.r0(r0), .r1(r1), .data(i1[i]));
  end

  function automatic int md(input int x, input int m);
    int r;
    r = x % m;
    return (r < 0) ? r + m : r;
  endfunction

  initial begin
    for (int i = 0; i < 3; i++) begin
      for (int d = -(MV[i] - 1); d <= MV[i] - 1; d++) begin
        r0 = 5'(md(d, 30)); r1 = 5'(md(d, 31));
        @(posedge clk);
        checks++;
        if (md(d, MV[i]) == 0) begin
          if (i0[i] != 5'd31 || i1[i] != 5'd31) begin
            failures++;
            $display("FAIL M=%0d zero difference %0d: got %0d %0d", MV[i], d, i0[i], i1[i]);
          end
        end else begin
          int k, v;
          k = -1;
          for (int c = 0; c < MV[i] - 1; c++) if (c % 30 == int'(i0[i]) && c % 31 == int'(i1[i])) k = c;
          v = 1;
          for (int c = 0; c < k; c++) v = (v * GV[i]) % MV[i];
          if (k < 0 || v != md(d, MV[i])) begin
            failures++;
            $display("FAIL M=%0d difference %0d: indices %0d %0d", MV[i], d, i0[i], i1[i]);
          end
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
