// delay_line: a chain of DEPTH pipeline registers of width W.
//
// It keeps a value in step with a pipeline it bypasses: the sums of the
// butterfly travel this way past the multiplication stages, and the 4n+1
// butterflies are lengthened by two stages to line up with the 4n+3 one.
// Output q equals input d from DEPTH clock cycles earlier.  An active-low
// asynchronous reset clears every register.  DEPTH = 0 is a plain wire.
//
// The two-stage alignment comes from the source design; using edge-triggered
// registers with a reset instead of level-sensitive latches is this design's own.
module delay_line #(
  parameter int unsigned W     = 8,
  parameter int unsigned DEPTH = 3
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  if (DEPTH == 0) begin : g_wire
    assign q = d;
  end else begin : g_regs
    logic [W-1:0] r [DEPTH];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int i = 0; i < int'(DEPTH); i++) r[i] <= '0;
      end else begin
        r[0] <= d;
        for (int i = 1; i < int'(DEPTH); i++) r[i] <= r[i-1];
      end
    end
    assign q = r[DEPTH-1];
  end
endmodule
