// ack_queue: Acknowledgement Queue (AQ) of the TSU's Post Processing Unit.
//
// When the processor finishes a thread it writes the thread's number, its
// status and its index to three memory-mapped registers (AqTNum, AqStat,
// AqIndx). The first two are staging registers; the write of AqIndx pushes the
// triple {Thread#, Status, Index} into a first-in first-out queue of DEPTH
// entries (16 in the prototype). The PPU drains the queue from the other end.
//
// Interface: wr_tnum/wr_stat/wr_indx are one-cycle write strobes with the data
// on wdata. wr_indx must only be given while full is low (the bus interface
// holds the bus access until then). The read side is first-word-fall-through:
// deq_valid/deq_data show the oldest entry, deq_ready removes it.
// Timing: an entry pushed in cycle t is visible at the read side in cycle t+1.
//
// The register names and the three fields follow the document; which register
// write commits the entry is this design's choice.
module ack_queue
  import d2cmp_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        wr_tnum,
  input  logic        wr_stat,
  input  logic        wr_indx,
  input  logic [31:0] wdata,
  output logic        full,
  output logic        empty,
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic        deq_valid,
  output ack_t        deq_data,
  input  logic        deq_ready
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH+1);

  tnum_t   aq_tnum_q;
  status_e aq_stat_q;
  ack_t    mem [DEPTH];
  logic [AW-1:0] wp_q, rp_q;
  logic [$clog2(DEPTH+1)-1:0] cnt_q;
  logic push, pop;

  assign push      = wr_indx && (cnt_q != DEPTH[$clog2(DEPTH+1)-1:0]);
  assign pop       = deq_ready && (cnt_q != '0);
  assign full      = (cnt_q == DEPTH[$clog2(DEPTH+1)-1:0]);
  assign empty     = (cnt_q == '0);
  assign count     = cnt_q;
  assign deq_valid = !empty;
  assign deq_data  = mem[rp_q];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      aq_tnum_q <= '0;
      aq_stat_q <= ST_ALL;
    end else begin
      if (wr_tnum) aq_tnum_q <= wdata[TNUM_W-1:0];
      if (wr_stat) aq_stat_q <= status_e'(wdata[STAT_W-1:0]);
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wp_q] <= '{tnum: aq_tnum_q, status: aq_stat_q, index: wdata[INDEX_W-1:0]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp_q  <= '0;
      rp_q  <= '0;
      cnt_q <= '0;
    end else begin
      if (push) wp_q <= (wp_q == AW'(DEPTH-1)) ? '0 : wp_q + 1'b1;
      if (pop)  rp_q <= (rp_q == AW'(DEPTH-1)) ? '0 : rp_q + 1'b1;
      cnt_q <= cnt_q + CW'(push) - CW'(pop);
    end
  end

  // A push into a full queue would lose an acknowledgement.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) wr_indx |-> !full);

endmodule
