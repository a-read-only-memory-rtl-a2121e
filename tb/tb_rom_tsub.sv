// tb_rom_tsub: exhaustive check of the sub-modulo subtraction tables.
//
// All legal pairs a, b in 0..MS-1 are applied for MS = 30 and 31; the result
// must be the value d in 0..MS-1 with b + d = a (mod MS), found by search.
//
// What is checked comes from the original design where it specifies it
// (arithmetic, table contents, latency); everything else follows this
// implementation's own interface choices.
module tb_rom_tsub;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0;
  int failures = 0;

  localparam int MSV [2] = '{30, 31};
  logic [4:0] a, b;
  logic [4:0] data [2];

  for (genvar i = 0; i < 2; i++) begin : g_dut
    rom_tsub #(.MS(MSV[i])) u (.a(a), .b(b), .data(data[i]));
  end

  initial begin
    for (int ib = 0; ib < 31; ib++)
      for (int ia = 0; ia < 31; ia++) begin
        a = 5'(ia); b = 5'(ib);
        @(posedge clk);
        for (int i = 0; i < 2; i++) if (ia < MSV[i] && ib < MSV[i]) begin
          int e;
          e = -1;
          for (int d = 0; d < MSV[i]; d++) if ((ib + d) % MSV[i] == ia) e = d;
          checks++;
          if (int'(data[i]) != e) begin
            failures++;
            $display("FAIL MS=%0d %0d-%0d: got %0d expected %0d", MSV[i], ia, ib, data[i], e);
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
