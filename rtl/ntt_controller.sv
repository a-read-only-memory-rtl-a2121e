// ntt_controller: sequencer of the 128-point NTT processor.
//
// After `start` the controller
//   LOAD   accepts N input points (one per in_valid) into bank 0,
//   RUN    issues LOG2N stages of N/2 butterflies, one per cycle, stage after
//          stage with no gap: stage s reads bank s mod 2 and writes the other;
//          the butterfly position runs 0..N/2-1 within a stage,
//   DRAIN  waits LAT cycles for the last results to be written,
//   UNLOAD reads the N results from the final bank in natural order of the
//          transform index (bit-reversed memory addresses), one per cycle,
// and then pulses `done` and returns to IDLE.  The direction (forward or
// inverse) is sampled at `start` and held for the whole transform.
//
// The destination of each butterfly's results is its issue tag (bank and
// position) delayed by LAT cycles in a latch chain, matching the lag of the
// butterfly pipeline, so the write needs no handshake.  Issuing stage s + 1
// straight after stage s is safe: butterfly p of stage s + 1 needs the
// results of butterflies p/2 and N/4 + p/2 of stage s, which have been
// written LAT + 1 cycles after their issue, before N/2 + p (for LAT < N/4).
//
// Interface timing: in_ready is high in LOAD; ld_en/ld_addr are the load write
// for the current cycle.  ul_valid, ul_index and ul_addr are combinational
// from the state; the memory read with ul_addr is valid in the same cycle.
//
// Stage and position sequencing, the memory role exchange and the twiddle
// addressing by stage and position follow the source design (where a computer
// loop played this role); the state machine, the load/unload protocol and the
// gap-free issue are this design's own.
module ntt_controller
  import ntt_pkg::*;
#(
  parameter int unsigned N   = NPT,
  parameter int unsigned LAT = LAT_4N3
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic                 inv_req,     // direction for this transform
  input  logic                 in_valid,    // input point present (LOAD)
  output logic                 in_ready,
  output logic                 busy,
  // load write into bank 0
  output logic                 ld_en,
  output logic [$clog2(N)-1:0] ld_addr,
  // butterfly issue
  output logic                 bf_valid,
  output logic                 bf_inv,
  output logic [2:0]           bf_stg,
  output logic [$clog2(N)-2:0] bf_pos,
  output logic                 rd_bank,
  // butterfly result write
  output logic                 wr_en,
  output logic                 wr_bank,
  output logic [$clog2(N)-2:0] wr_pos,
  // unload
  output logic                 ul_valid,
  output logic                 ul_bank,
  output logic [$clog2(N)-1:0] ul_addr,
  output logic [$clog2(N)-1:0] ul_index,
  output logic                 done
);
  localparam int unsigned LN    = $clog2(N);
  localparam int unsigned NISS  = LN * (N / 2);
  localparam int unsigned CW    = $clog2(NISS + 1);

  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_RUN, S_DRAIN, S_UNLOAD} state_t;
  state_t        state;
  logic [CW-1:0] cnt;
  logic          inv_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cnt   <= '0;
      inv_q <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_LOAD;
          cnt   <= '0;
          inv_q <= inv_req;
        end
        S_LOAD: if (in_valid) begin
          if (cnt == CW'(N - 1)) begin
            state <= S_RUN;
            cnt   <= '0;
          end else cnt <= cnt + 1'b1;
        end
        S_RUN: begin
          if (cnt == CW'(NISS - 1)) begin
            state <= S_DRAIN;
            cnt   <= '0;
          end else cnt <= cnt + 1'b1;
        end
        S_DRAIN: begin
          if (cnt == CW'(LAT - 1)) begin
            state <= S_UNLOAD;
            cnt   <= '0;
          end else cnt <= cnt + 1'b1;
        end
        S_UNLOAD: begin
          if (cnt == CW'(N - 1)) begin
            state <= S_IDLE;
            cnt   <= '0;
            done  <= 1'b1;
          end else cnt <= cnt + 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign in_ready = (state == S_LOAD);
  assign busy     = (state != S_IDLE);
  assign ld_en    = in_ready && in_valid;
  assign ld_addr  = LN'(cnt);

  assign bf_valid = (state == S_RUN);
  assign bf_inv   = inv_q;
  assign bf_stg   = 3'(cnt / CW'(N / 2));
  assign bf_pos   = (LN-1)'(cnt % CW'(N / 2));
  assign rd_bank  = bf_stg[0];

  // the issue tag travels alongside the butterfly pipeline
  logic [LN:0] tag;
  delay_line #(.W(LN + 1), .DEPTH(LAT)) u_tag (
    .clk(clk), .rst_n(rst_n),
    .d({bf_valid, ~bf_stg[0], bf_pos}), .q(tag));
  assign wr_en   = tag[LN];
  assign wr_bank = tag[LN-1];
  assign wr_pos  = tag[LN-2:0];

  // loading and result writing never overlap
  always_comb assert (!rst_n || !(wr_en && ld_en));

  assign ul_valid = (state == S_UNLOAD);
  assign ul_bank  = 1'(LN % 2);
  assign ul_index = LN'(cnt);
  always_comb begin
    for (int i = 0; i < int'(LN); i++) ul_addr[i] = ul_index[LN-1-i];
  end
endmodule
