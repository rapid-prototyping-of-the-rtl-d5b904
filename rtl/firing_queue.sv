// firing_queue: Firing Queue (FQ) of the TSU's Thread Issue Unit, whose head
// forms the processor-visible Ready Queue registers RqTNum, RqIndx, RqIptr and
// RqDptr.
//
// Each entry is {Thread#, Index, IFP, DFP} of a thread instance ready to run.
// DEPTH is 16 entries, as in the prototype. The head entry is always presented
// on rq_head with rq_valid; the processor reads the four fields and the read of
// RqIptr removes the entry (rq_pop). Reading an empty queue is harmless: the
// bus interface then returns 0 as IFP, which software treats as "no thread".
//
// Interface: enq_valid/enq_ready/enq_data push; rq_valid/rq_head/rq_pop read.
// An entry pushed in cycle t is at the head in cycle t+1 if the queue was empty.
module firing_queue
  import d2cmp_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  enq_valid,
  output logic  enq_ready,
  input  fire_t enq_data,
  output logic  rq_valid,
  output fire_t rq_head,
  input  logic  rq_pop,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH+1);

  fire_t mem [DEPTH];
  logic [AW-1:0] wp_q, rp_q;
  logic [CW-1:0] cnt_q;
  logic push, pop;

  assign enq_ready = (cnt_q != CW'(DEPTH));
  assign rq_valid  = (cnt_q != '0);
  assign push      = enq_valid && enq_ready;
  assign pop       = rq_pop && rq_valid;
  assign rq_head   = mem[rp_q];
  assign count     = cnt_q;

  always_ff @(posedge clk) begin
    if (push) mem[wp_q] <= enq_data;
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

endmodule
