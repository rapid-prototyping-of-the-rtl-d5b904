// thread_issue_unit: Thread Issue Unit (TIU) of the TSU.
//
// The TIU turns thread instances that the PPU found ready into work for the
// processor. It holds the Waiting Queue (WQ) of ready {Thread#, Index} pairs
// and the Firing Queue (FQ) whose head is the Ready Queue the processor reads.
// For each WQ entry it reads the thread's Instruction Frame Pointer and Data
// Frame Pointer through port B of the Graph Memory and pushes
// {Thread#, Index, IFP, DFP} into the FQ. It runs independently of the PPU.
//
// Structure and queue contents follow the document; the two-stage pipeline
// (WQ pop and GM read, then FQ push) is this design's.
//
// Timing: a WQ entry is popped in cycle t and written to the FQ at the end of
// cycle t+1; with both queues flowing the TIU moves one thread per cycle. It
// waits, holding its entry, while the FQ is full.
module thread_issue_unit
  import d2cmp_pkg::*;
#(
  parameter int unsigned GM_DEPTH = 256,
  parameter int unsigned WQ_DEPTH = 16,
  parameter int unsigned FQ_DEPTH = 16
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // from the PPU
  input  logic                        wq_valid,
  output logic                        wq_ready,
  input  ready_t                      wq_data,
  // Graph Memory port B
  output logic [$clog2(GM_DEPTH)-1:0] gm_entry,
  input  ptr_t                        gm_ifp,
  input  ptr_t                        gm_dfp,
  // Ready Queue registers
  output logic                        rq_valid,
  output fire_t                       rq_head,
  input  logic                        rq_pop,
  output logic [$clog2(WQ_DEPTH+1)-1:0] wq_count,
  output logic [$clog2(FQ_DEPTH+1)-1:0] fq_count,
  output logic                        idle,
  output logic                        ev_issue     // thread moved into the FQ
);
  localparam int unsigned GW = $clog2(GM_DEPTH);

  logic   wqh_valid, wqh_pop;
  ready_t wqh_data;
  logic   stage_q;            // an entry waits for its GM answer / FQ room
  ready_t cur_q;
  logic   fq_ready, fq_push, advance;

  waiting_queue #(.DEPTH(WQ_DEPTH)) u_wq (
    .clk, .rst_n,
    .enq_valid(wq_valid),
    .enq_ready(wq_ready),
    .enq_data (wq_data),
    .deq_valid(wqh_valid),
    .deq_ready(wqh_pop),
    .deq_data (wqh_data),
    .count    (wq_count)
  );

  firing_queue #(.DEPTH(FQ_DEPTH)) u_fq (
    .clk, .rst_n,
    .enq_valid(fq_push),
    .enq_ready(fq_ready),
    .enq_data ('{tnum: cur_q.tnum, index: cur_q.index, ifp: gm_ifp, dfp: gm_dfp}),
    .rq_valid,
    .rq_head,
    .rq_pop,
    .count    (fq_count)
  );

  // The stage empties when its entry enters the FQ; a new entry may enter
  // the stage in the same cycle.
  assign fq_push  = stage_q;
  assign advance  = !stage_q || fq_ready;
  assign wqh_pop  = advance && wqh_valid;
  assign gm_entry = advance ? wqh_data.tnum[GW-1:0] : cur_q.tnum[GW-1:0];
  assign ev_issue = stage_q && fq_ready;
  assign idle     = !stage_q && !wqh_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stage_q <= 1'b0;
      cur_q   <= '0;
    end else if (advance) begin
      stage_q <= wqh_valid;
      if (wqh_valid) cur_q <= wqh_data;
    end
  end

endmodule
