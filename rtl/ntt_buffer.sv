// ntt_buffer: supporting memory of the NTT processor, two banks of N words.
//
// While one bank feeds the butterfly the other receives its results; the
// banks exchange roles at the end of every stage.  The access pattern is the
// constant-geometry one: butterfly p of every stage reads the words at p and
// p + N/2 of the source bank and its two results go to the consecutive
// locations 2p and 2p + 1 of the destination bank.  After log2(N) stages the
// transform lies in the destination bank in bit-reversed order.
//
// Ports:
//   rd_bank, rd_pos  -> rd_a = bank[rd_pos], rd_b = bank[rd_pos + N/2]
//                       (combinational read, the butterfly latches them)
//   wr_en, wr_bank, wr_pos, wr_c, wr_d -> bank[2*wr_pos] = wr_c,
//                       bank[2*wr_pos + 1] = wr_d on the rising edge
//   ld_en, ld_bank, ld_addr, ld_data   -> single-word write for loading input
//   ul_bank, ul_addr -> ul_data        (combinational read for unloading)
// A pair write has priority over a load write in the same cycle; the
// controller never issues both.
//
// The two sub-memories with exchanging roles, reading points N/2 apart and
// writing consecutive locations follow the source design; the port set and
// the single-word load/unload ports are this design's own.  The memory is
// written as arrays without reset, as a RAM would be.
module ntt_buffer #(
  parameter int unsigned N  = 128,
  parameter int unsigned W  = 54,
  parameter int unsigned AW = $clog2(N)
) (
  input  logic          clk,
  // butterfly source
  input  logic          rd_bank,
  input  logic [AW-2:0] rd_pos,
  output logic [W-1:0]  rd_a,
  output logic [W-1:0]  rd_b,
  // butterfly destination
  input  logic          wr_en,
  input  logic          wr_bank,
  input  logic [AW-2:0] wr_pos,
  input  logic [W-1:0]  wr_c,
  input  logic [W-1:0]  wr_d,
  // loading
  input  logic          ld_en,
  input  logic          ld_bank,
  input  logic [AW-1:0] ld_addr,
  input  logic [W-1:0]  ld_data,
  // unloading
  input  logic          ul_bank,
  input  logic [AW-1:0] ul_addr,
  output logic [W-1:0]  ul_data
);
  logic [W-1:0] mem0 [N];
  logic [W-1:0] mem1 [N];

  always_ff @(posedge clk) begin
    if (wr_en) begin
      if (wr_bank) begin
        mem1[{wr_pos, 1'b0}] <= wr_c;
        mem1[{wr_pos, 1'b1}] <= wr_d;
      end else begin
        mem0[{wr_pos, 1'b0}] <= wr_c;
        mem0[{wr_pos, 1'b1}] <= wr_d;
      end
    end else if (ld_en) begin
      if (ld_bank) mem1[ld_addr] <= ld_data;
      else         mem0[ld_addr] <= ld_data;
    end
  end

  assign rd_a    = rd_bank ? mem1[{1'b0, rd_pos}] : mem0[{1'b0, rd_pos}];
  assign rd_b    = rd_bank ? mem1[{1'b1, rd_pos}] : mem0[{1'b1, rd_pos}];
  assign ul_data = ul_bank ? mem1[ul_addr] : mem0[ul_addr];

endmodule
