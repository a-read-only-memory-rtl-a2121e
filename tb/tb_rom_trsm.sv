// tb_rom_trsm: exhaustive check of the residue table (TRSM).
//
// Four instances (193 and 449 against both sub-moduli, 191 against 31) are
// swept over every legal residue.  The expected sub-residue is found by
// repeated subtraction, not by the % operator the table is built with.
//
// What is checked comes from the original design where it specifies it
// (arithmetic, table contents, latency); everything else follows this
// implementation's own interface choices.
module tb_rom_trsm;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0;
  int failures = 0;

  localparam int MV [4]  = '{193, 193, 449, 191};
  localparam int MSV [4] = '{30, 31, 30, 31};

  logic [8:0] addr;
  logic [4:0] data [4];

  for (genvar i = 0; i < 4; i++) begin : g_dut
    rom_trsm #(.M(MV[i]), .MS(MSV[i])) u (.addr(addr[$clog2(MV[i])-1:0]), .data(data[i]));
  end

  initial begin
    for (int a = 0; a < 449; a++) begin
      addr = 9'(a);
      @(posedge clk);
      for (int i = 0; i < 4; i++) if (a < MV[i]) begin
        int e;
        e = a;
        while (e >= MSV[i]) e -= MSV[i];
        checks++;
        if (int'(data[i]) != e) begin
          failures++;
          $display("FAIL M=%0d MS=%0d addr %0d: got %0d expected %0d", MV[i], MSV[i], a, data[i], e);
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
