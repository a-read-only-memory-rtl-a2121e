// tb_rom_tadd: exhaustive check of the sub-modulo addition tables (TADD and
// the TADMUL variant with a constant index offset K).
//
// Every pair of 5-bit inputs is applied.  Legal inputs must give the sum
// (plus K) folded into 0..MS-1; an input equal to 31 (index of zero) must give
// 31.  The expected value is formed by subtracting MS until in range.
//
// What is checked comes from the original design where it specifies it
// (arithmetic, table contents, latency); everything else follows this
// implementation's own interface choices.
module tb_rom_tadd;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0;
  int failures = 0;

  localparam int MSV [4] = '{30, 31, 30, 31};
  localparam int KV  [4] = '{0, 0, 3, 3};

  logic [4:0] a, b;
  logic [4:0] data [4];

  for (genvar i = 0; i < 4; i++) begin : g_dut
    rom_tadd #(.MS(MSV[i]), .K(KV[i])) u (.a(a), .b(b), .data(data[i]));
  end

  initial begin
    for (int ib = 0; ib < 32; ib++)
      for (int ia = 0; ia < 32; ia++) begin
        a = 5'(ia); b = 5'(ib);
        @(posedge clk);
        for (int i = 0; i < 4; i++) begin
          int e;
          if (ia == 31 || ib == 31) e = 31;
          else if (ia >= MSV[i] || ib >= MSV[i]) continue;   // never applied
          else begin
            e = ia + ib + KV[i];
            while (e >= MSV[i]) e -= MSV[i];
          end
          checks++;
          if (int'(data[i]) != e) begin
            failures++;
            $display("FAIL MS=%0d K=%0d %0d+%0d: got %0d expected %0d", MSV[i], KV[i], ia, ib, data[i], e);
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
