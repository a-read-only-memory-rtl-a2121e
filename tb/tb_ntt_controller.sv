// tb_ntt_controller: check of the transform sequencer.
//
// Two transforms are run (forward, then inverse) with random idle cycles on
// the input side.  Checked: load writes go to addresses 0..127 in order and
// only when in_valid; RUN starts the cycle after the last load and issues
// 7 x 64 butterflies on consecutive cycles with stage = n / 64,
// position = n mod 64 and source bank = stage mod 2; every write tag equals
// the issue tag (position, other bank) seven cycles later; no write remains
// outstanding when unloading starts seven cycles after the last issue; the
// unload addresses are the bit reversals of indices 0..127 from bank 1;
// done pulses once, the cycle after the last unload; the direction is held.
//
// What is checked comes from the original design where it specifies it
// (arithmetic, table contents, latency); everything else follows this
// implementation's own interface choices.
module tb_ntt_controller;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0;
  int failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  logic       start, inv_req, in_valid, in_ready, busy, ld_en, bf_valid, bf_inv, rd_bank;
  logic       wr_en, wr_bank, ul_valid, ul_bank, done;
  logic [6:0] ld_addr, ul_addr, ul_index;
  logic [2:0] bf_stg;
  logic [5:0] bf_pos, wr_pos;

  ntt_controller dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL cycle %0d: %s", cycle, what);
    end
  endtask

  // issue tags and their write-back
  typedef struct { int bank, pos, t; } tag_t;
  tag_t tags [$];
  always @(posedge clk) begin
    if (rst_n && bf_valid) tags.push_back('{int'(~bf_stg[0]), int'(bf_pos), cycle});
    if (rst_n && wr_en) begin
      tag_t e;
      if (tags.size() == 0) chk(1'b0, "write without issue");
      else begin
        e = tags.pop_front();
        chk(wr_bank == 1'(e.bank) && wr_pos == 6'(e.pos) && cycle - e.t == 7, "write tag");
      end
    end
  end

  task automatic transform(input bit inverse);
    int n, t_last_ld, t_run, iss, t_last_iss, ul;
    @(negedge clk);
    start = 1'b1; inv_req = inverse;
    @(negedge clk);
    start = 1'b0; inv_req = ~inverse;      // must not matter any more
    n = 0;
    while (n < 128) begin
      in_valid = ($urandom_range(4) != 0);
      #1;
      chk(in_ready, "ready while loading");
      chk(ld_en == in_valid, "load enable");
      if (in_valid) begin
        chk(ld_addr == 7'(n), "load address");
        n++;
        t_last_ld = cycle;
      end
      @(negedge clk);
    end
    in_valid = 1'b0;
    // issue phase
    iss = 0;
    t_run = cycle;
    chk(t_run == t_last_ld + 1, "run follows the last load");
    while (bf_valid) begin
      chk(bf_stg == 3'(iss / 64) && bf_pos == 6'(iss % 64) && rd_bank == 1'((iss / 64) % 2),
          "issue order");
      chk(bf_inv == inverse, "direction held");
      chk(!in_ready, "no input while running");
      iss++;
      t_last_iss = cycle;
      @(negedge clk);
    end
    chk(iss == 448, "448 butterflies");
    // unload
    while (!ul_valid) @(negedge clk);
    chk(cycle == t_last_iss + 8, "unload starts after the drain");
    chk(tags.size() == 0, "all results written before unloading");
    ul = 0;
    while (ul_valid) begin
      logic [6:0] r;
      for (int i = 0; i < 7; i++) r[i] = ul_index[6 - i];
      chk(ul_index == 7'(ul) && ul_addr == r && ul_bank == 1'b1, "unload address");
      ul++;
      @(negedge clk);
    end
    chk(ul == 128, "128 results");
    chk(done && !busy, "done after the last result");
    @(negedge clk);
    chk(!done, "done is one pulse");
  endtask

  initial begin
    start = 1'b0; inv_req = 1'b0; in_valid = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    chk(!busy && !in_ready && !bf_valid && !ul_valid, "idle after reset");
    transform(1'b0);
    transform(1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
