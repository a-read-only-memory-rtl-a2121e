// stage_strobe_gen: clock circuitry for a latch-based butterfly pipeline.
//
// A 4-bit binary counter advances on every clock; a one-of-sixteen decoder
// marks the current count; alternate decoder outputs (counts 0, 2, 4, ...)
// become the strobes of the NSTAGE latch stages, the output stage first and
// the input stage last.  Each latch therefore captures the data of the stage
// after it has been passed on, and one clock period separates two strobes,
// so no two stages are ever open at once.  One full count (16 clocks) is one
// butterfly period.  A final register plays the part of the buffer that
// drives the latches, so every strobe is a clean one-clock pulse.
//
// Interface: strobe[k] is the strobe of pipeline stage k + 1 (stage NSTAGE is
// the output stage).  count is the counter value.  Strobes follow the count
// by one clock.  Active-low asynchronous reset clears the counter.
//
// The counter, the one-of-sixteen decoder, the use of alternate outputs, the
// five stages and the output-stage-first order follow the source design; the
// assignment of decoder outputs 0, 2, ..., 8 to stages 5, 4, ..., 1 is this
// design's own choice (the connection is not given).
module stage_strobe_gen #(
  parameter int unsigned NSTAGE = 5,
  parameter int unsigned CW     = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  output logic [CW-1:0]     count,
  output logic [NSTAGE-1:0] strobe
);
  logic [2**CW-1:0] dec;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) count <= '0;
    else        count <= count + 1'b1;
  end

  // one-of-sixteen decoder (active high here; the inverters are folded in)
  always_comb begin
    dec = '0;
    dec[count] = 1'b1;
  end

  // alternate outputs, output stage first
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) strobe <= '0;
    else
      for (int k = 0; k < int'(NSTAGE); k++)
        strobe[k] <= dec[2 * (NSTAGE - 1 - k)];
  end

  initial assert (2 * NSTAGE <= 2**CW);
endmodule
