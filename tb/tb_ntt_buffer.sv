// tb_ntt_buffer: check of the two-bank supporting memory.
//
// A model of both banks is kept here.  Random single-word loads, butterfly
// pair writes (word pair to 2p and 2p + 1) and reads are mixed; every cycle
// the butterfly read port (words p and p + 64 of the selected bank) and the
// unload port are compared with the model.  Writes take effect at the next
// rising edge, reads are combinational.
//
// What is checked comes from the original design where it specifies it
// (arithmetic, table contents, latency); everything else follows this
// implementation's own interface choices.
module tb_ntt_buffer;
  localparam int N = 128;
  localparam int W = 54;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0;
  int failures = 0;

  logic         rd_bank, wr_en, wr_bank, ld_en, ld_bank, ul_bank;
  logic [5:0]   rd_pos, wr_pos;
  logic [6:0]   ld_addr, ul_addr;
  logic [W-1:0] rd_a, rd_b, wr_c, wr_d, ld_data, ul_data;

  ntt_buffer #(.N(N), .W(W)) dut (.*);

  logic [W-1:0] model [2][N];

  function automatic logic [W-1:0] rnd();
    return {22'($urandom), $urandom};
  endfunction

  initial begin
    wr_en = 1'b0; ld_en = 1'b0;
    // fill both banks through the load port
    for (int bk = 0; bk < 2; bk++)
      for (int i = 0; i < N; i++) begin
        @(negedge clk);
        ld_en = 1'b1; ld_bank = 1'(bk); ld_addr = 7'(i); ld_data = rnd();
        model[bk][i] = ld_data;
      end
    @(negedge clk);
    ld_en = 1'b0;
    for (int t = 0; t < 3000; t++) begin
      // check the read ports against the model
      rd_bank = 1'($urandom_range(1)); rd_pos = 6'($urandom);
      ul_bank = 1'($urandom_range(1)); ul_addr = 7'($urandom);
      #1;
      checks++;
      if (rd_a != model[rd_bank][{1'b0, rd_pos}] || rd_b != model[rd_bank][{1'b1, rd_pos}]) begin
        failures++;
        $display("FAIL: butterfly read bank %0d pos %0d", rd_bank, rd_pos);
      end
      checks++;
      if (ul_data != model[ul_bank][ul_addr]) begin
        failures++;
        $display("FAIL: unload read bank %0d address %0d", ul_bank, ul_addr);
      end
      // a write for the coming edge
      wr_en = 1'b0; ld_en = 1'b0;
      if ($urandom_range(1)) begin
        wr_en = 1'b1; wr_bank = 1'($urandom_range(1)); wr_pos = 6'($urandom);
        wr_c = rnd(); wr_d = rnd();
        model[wr_bank][{wr_pos, 1'b0}] = wr_c;
        model[wr_bank][{wr_pos, 1'b1}] = wr_d;
      end else if ($urandom_range(1)) begin
        ld_en = 1'b1; ld_bank = 1'($urandom_range(1)); ld_addr = 7'($urandom);
        ld_data = rnd();
        model[ld_bank][ld_addr] = ld_data;
      end
      @(negedge clk);
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
