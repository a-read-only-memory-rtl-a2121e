// tb_rom_tinv: check of the inverse-index tables (TINV).
//
// Every index sum k in 0..929 is applied as (k mod 30, k mod 31); the output
// must be g^k mod M, computed here by repeated multiplication (so the table's
// reduction of the sum modulo M-1 is tested too).  Pairs with a 31 (index of
// zero) must give 0.  The variant with output already reduced to a
// sub-modulus (used by the 4n+3 unit) is tested for 191 with OUT_MS = 30, 31.
//
// What is checked comes from the original design where it specifies it
// (arithmetic, table contents, latency); everything else follows this
// implementation's own interface choices.
module tb_rom_tinv;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0;
  int failures = 0;

  localparam int MV [4] = '{193, 449, 191, 191};
  localparam int GV [4] = '{5, 3, 19, 19};
  localparam int OV [4] = '{0, 0, 30, 31};

  logic [4:0] r0, r1;
  logic [8:0] data [4];

  for (genvar i = 0; i < 4; i++) begin : g_dut
    rom_tinv #(.M(MV[i]), .G(GV[i]), .OUT_MS(OV[i])) u (.r0(r0), .r1(r1), .data(data[i]));
  end

  initial begin
    for (int k = 0; k < 930 + 2; k++) begin
      if (k < 930) begin r0 = 5'(k % 30); r1 = 5'(k % 31); end
      else if (k == 930) begin r0 = 5'd31; r1 = 5'd4; end
      else begin r0 = 5'd7; r1 = 5'd31; end
      @(posedge clk);
      for (int i = 0; i < 4; i++) begin
        int e;
        e = 1;
        if (k >= 930) e = 0;
        else for (int c = 0; c < k; c++) e = (e * GV[i]) % MV[i];
        if (OV[i] != 0) e = e % OV[i];
        checks++;
        if (int'(data[i]) != e) begin
          failures++;
          $display("FAIL M=%0d out_ms=%0d index %0d: got %0d expected %0d", MV[i], OV[i], k, data[i], e);
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
