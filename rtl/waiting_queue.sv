// waiting_queue: Waiting Queue (WQ) of the TSU's Thread Issue Unit.
//
// Holds thread instances that the Post Processing Unit has found ready for
// execution (Ready Count reached zero), as {Thread#, Index} pairs, in arrival
// order, until the Thread Issue Unit fetches their frame pointers. DEPTH is 16
// entries, as in the prototype.
//
// Interface: enq_valid/enq_data push when enq_ready (not full) is high; the read
// side is first-word-fall-through (deq_valid/deq_data, deq_ready pops).
// An entry pushed in cycle t can be popped in cycle t+1.
module waiting_queue
  import d2cmp_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   enq_valid,
  output logic   enq_ready,
  input  ready_t enq_data,
  output logic   deq_valid,
  input  logic   deq_ready,
  output ready_t deq_data,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH+1);

  ready_t mem [DEPTH];
  logic [AW-1:0] wp_q, rp_q;
  logic [CW-1:0] cnt_q;
  logic push, pop;

  assign enq_ready = (cnt_q != CW'(DEPTH));
  assign deq_valid = (cnt_q != '0);
  assign push      = enq_valid && enq_ready;
  assign pop       = deq_ready && deq_valid;
  assign deq_data  = mem[rp_q];
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
