// post_processing_unit: Post Processing Unit (PPU) of the TSU.
//
// The PPU performs the synchronization work left behind by completed threads.
// It holds the Acknowledgement Queue, the Consumer Select Unit (with the
// consumer-list memory) and the Synchronization Memory with its mapping unit;
// it reads consumer fields and initial Ready Counts through port A of the
// Graph Memory. For each acknowledgement {Thread#, Status, Index} it:
//   1. reads the producer's template from the GM (consumer fields),
//   2. lets the Consumer Select Unit list the consumers to update,
//   3. for each consumer looks up {consumer Thread#, Index} in the SM. On a hit
//      the stored count is decremented; on a miss a new instance starts from
//      the consumer's Ready Count in the GM, minus one. A count that reaches
//      zero sends {consumer, Index} to the Waiting Queue and frees the SM
//      entry; otherwise the count is written back (allocating an entry on a
//      miss).
// The PPU also performs SM loads requested by the processor (initialising a
// block's ready counts) when no acknowledgement is waiting, so a load takes
// effect after every acknowledgement written before it. A load of count 0
// releases the instance's entry.
//
// Thread# = {Context, Block, ThreadID}: the bits below the GM address width
// ({Block, ThreadID}, 8 bits at the default 256 entries) select the template;
// the bits above are the Context, set at run time to tell invocations apart.
// A consumer named with Context 0 inherits the producer's Context.
//
// Following the document: the AQ, SM, GM, consumer rule and the
// decrement-and-test-for-zero flow. This design's choices: the Context split
// and inheritance rule; consumers inherit the producer's Index; an instance
// not yet in the SM is created on its first update from the GM Ready Count; the PPU stalls (holding its state) while the
// WQ is full or no SM entry is free.
//
// Timing: acknowledgement popped in cycle t, GM answer in t+1, consumer
// selection starts t+2; each consumer then takes two cycles (select, look up
// and update) if nothing stalls, plus one read cycle per list word.
module post_processing_unit
  import d2cmp_pkg::*;
#(
  parameter int unsigned GM_DEPTH   = 256,
  parameter int unsigned SM_ENTRIES = 64,
  parameter int unsigned AQ_DEPTH   = 16,
  parameter int unsigned CL_DEPTH   = 256
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // acknowledgement registers (from the bus interface)
  input  logic                        aq_wr_tnum,
  input  logic                        aq_wr_stat,
  input  logic                        aq_wr_indx,
  input  logic [31:0]                 wdata,
  output logic                        aq_full,
  output logic                        aq_empty,
  output logic [$clog2(AQ_DEPTH+1)-1:0] aq_count,
  // consumer-list loading
  input  logic                        cl_we,
  input  logic [$clog2(CL_DEPTH)-1:0] cl_waddr,
  // SM loading: held until sm_load_ready
  input  logic                        sm_load_valid,
  input  ready_t                      sm_load_key,
  input  rc_t                         sm_load_count,
  output logic                        sm_load_ready,
  // Graph Memory port A
  output logic [$clog2(GM_DEPTH)-1:0] gm_entry,
  input  tnum_t                       gm_cons1,
  input  tnum_t                       gm_cons2,
  input  rc_t                         gm_rc,
  // to the Waiting Queue
  output logic                        wq_valid,
  input  logic                        wq_ready,
  output ready_t                      wq_data,
  // state and event strobes
  output logic                        idle,
  output logic                        sm_full,
  output logic [$clog2(SM_ENTRIES+1)-1:0] sm_used,
  output logic                        ev_ack,       // acknowledgement taken
  output logic                        ev_list,      // consumer taken from a list
  output logic                        ev_sm_hit,    // consumer found in the SM
  output logic                        ev_sm_alloc,  // new SM entry allocated
  output logic                        ev_fire,      // consumer became ready
  output logic                        ev_stall      // WQ full or SM full
);
  localparam int unsigned GW = $clog2(GM_DEPTH);
  localparam int unsigned SW = $clog2(SM_ENTRIES);

  typedef enum logic [1:0] {P_IDLE, P_GM, P_CONS, P_LOOK} state_e;

  state_e  state_q;
  ack_t    ack_q;
  tnum_t   cur_q;

  // AQ
  logic aq_valid, aq_pop;
  ack_t aq_head;

  ack_queue #(.DEPTH(AQ_DEPTH)) u_aq (
    .clk, .rst_n,
    .wr_tnum  (aq_wr_tnum),
    .wr_stat  (aq_wr_stat),
    .wr_indx  (aq_wr_indx),
    .wdata,
    .full     (aq_full),
    .empty    (aq_empty),
    .count    (aq_count),
    .deq_valid(aq_valid),
    .deq_data (aq_head),
    .deq_ready(aq_pop)
  );

  // Consumer Select Unit
  logic  cs_start, cs_busy, cs_list, cs_valid, cs_ready;
  tnum_t cs_tnum;

  consumer_select #(.CL_DEPTH(CL_DEPTH)) u_cs (
    .clk, .rst_n,
    .cl_we, .cl_waddr,
    .cl_wdata (wdata[TNUM_W-1:0]),
    .start    (cs_start),
    .cons1    (gm_cons1),
    .cons2    (gm_cons2),
    .status   (ack_q.status),
    .busy     (cs_busy),
    .list_mode(cs_list),
    .out_valid(cs_valid),
    .out_tnum (cs_tnum),
    .out_ready(cs_ready)
  );

  // Synchronization Memory
  ready_t          lk_key, sm_wkey;
  logic            lk_hit, free_avail, sm_we, sm_wvalid;
  logic [SW-1:0]   lk_idx, free_idx, sm_widx;
  rc_t             lk_count, sm_wcount;

  sync_memory #(.ENTRIES(SM_ENTRIES)) u_sm (
    .clk, .rst_n,
    .lk_key, .lk_hit, .lk_idx, .lk_count,
    .free_avail, .free_idx,
    .full     (sm_full),
    .used     (sm_used),
    .wr_en    (sm_we),
    .wr_idx   (sm_widx),
    .wr_valid (sm_wvalid),
    .wr_key   (sm_wkey),
    .wr_count (sm_wcount)
  );

  // Run-time Thread# of a consumer: a consumer field whose Context bits (the
  // bits above the GM address) are zero names a thread of the producer's own
  // invocation, so it takes the producer's Context; a non-zero Context is kept.
  tnum_t cons_tnum;
  assign cons_tnum = (cs_tnum[TNUM_W-1:GW] == '0)
                   ? {ack_q.tnum[TNUM_W-1:GW], cs_tnum[GW-1:0]} : cs_tnum;

  // decrement of the consumer's count (saturating at zero)
  rc_t base_count, new_count;
  assign base_count = lk_hit ? lk_count : gm_rc;
  assign new_count  = (base_count == '0) ? '0 : base_count - 1'b1;

  always_comb begin
    lk_key        = '{tnum: cur_q, index: ack_q.index};
    gm_entry      = ack_q.tnum[GW-1:0];
    aq_pop        = 1'b0;
    cs_start      = 1'b0;
    cs_ready      = 1'b0;
    sm_we         = 1'b0;
    sm_widx       = lk_idx;
    sm_wvalid     = 1'b0;
    sm_wkey       = lk_key;
    sm_wcount     = new_count;
    sm_load_ready = 1'b0;
    wq_valid      = 1'b0;
    wq_data       = lk_key;
    ev_list       = 1'b0;
    ev_sm_hit     = 1'b0;
    ev_sm_alloc   = 1'b0;
    ev_fire       = 1'b0;
    ev_stall      = 1'b0;
    unique case (state_q)
      P_IDLE: begin
        gm_entry = aq_head.tnum[GW-1:0];
        if (aq_valid) begin
          aq_pop = 1'b1;
        end else if (sm_load_valid) begin
          lk_key    = sm_load_key;
          sm_wkey   = sm_load_key;
          sm_wcount = sm_load_count;
          sm_wvalid = (sm_load_count != '0);
          sm_widx   = lk_hit ? lk_idx : free_idx;
          if (lk_hit || free_avail || sm_load_count == '0) begin
            sm_we         = lk_hit || (sm_load_count != '0);
            sm_load_ready = 1'b1;
          end
        end
      end
      P_GM: begin
        cs_start = 1'b1;
      end
      P_CONS: begin
        gm_entry = cs_tnum[GW-1:0];
        cs_ready = cs_valid;
        ev_list  = cs_valid && cs_list;
      end
      P_LOOK: begin
        gm_entry  = cur_q[GW-1:0];
        ev_sm_hit = 1'b0;
        if (new_count == '0) begin
          wq_valid = 1'b1;
          if (wq_ready) begin
            sm_we     = lk_hit;            // release the instance's entry
            sm_wvalid = 1'b0;
            ev_fire   = 1'b1;
            ev_sm_hit = lk_hit;
          end else begin
            ev_stall = 1'b1;
          end
        end else if (lk_hit) begin
          sm_we     = 1'b1;
          sm_wvalid = 1'b1;
          ev_sm_hit = 1'b1;
        end else if (free_avail) begin
          sm_we       = 1'b1;
          sm_widx     = free_idx;
          sm_wvalid   = 1'b1;
          ev_sm_alloc = 1'b1;
        end else begin
          ev_stall = 1'b1;
        end
      end
      default: ;
    endcase
  end

  logic look_done;
  assign look_done = (state_q == P_LOOK) && !ev_stall;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= P_IDLE;
      ack_q   <= '0;
      cur_q   <= '0;
    end else begin
      unique case (state_q)
        P_IDLE: if (aq_valid) begin
          ack_q   <= aq_head;
          state_q <= P_GM;
        end
        P_GM:   state_q <= P_CONS;
        P_CONS: begin
          if (cs_valid) begin
            cur_q   <= cons_tnum;
            state_q <= P_LOOK;
          end else if (!cs_busy) begin
            state_q <= P_IDLE;
          end
        end
        P_LOOK: if (look_done) state_q <= P_CONS;
        default: state_q <= P_IDLE;
      endcase
    end
  end

  assign idle   = (state_q == P_IDLE) && aq_empty;
  assign ev_ack = aq_pop;

  a_wq_hold: assert property (@(posedge clk) disable iff (!rst_n)
                              wq_valid && !wq_ready |=> wq_valid && $stable(wq_data));

endmodule
