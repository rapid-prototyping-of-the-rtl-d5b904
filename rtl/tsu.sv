// tsu: Thread Synchronization Unit of one D2-CMP node.
//
// The TSU schedules threads in data-driven order: a thread becomes ready only
// when all its producers have completed. It is a memory-mapped slave on the
// system bus, so an unmodified processor uses it with loads and stores: it
// stores the number, status and index of each completed thread into the
// Acknowledgement Queue, and loads the Instruction/Data Frame Pointers of the
// next ready thread from the Ready Queue.
//
// Inside, as in the document, two units run concurrently with each other and
// with the processor:
//   * Post Processing Unit (PPU): AQ -> Graph Memory consumers -> Consumer
//     Select Unit -> Synchronization Memory (Ready Count decrement) -> WQ;
//   * Thread Issue Unit (TIU): WQ -> Graph Memory IFP/DFP -> Firing Queue,
//     whose head is the Ready Queue.
// The Graph Memory is shared: port A serves the PPU, port B the TIU. A cycle
// counter serves measurements. Sizes default to the prototype's: GM 256
// entries, SM 64, AQ/WQ/FQ 16. The consumer-list size (CL_DEPTH) is this
// design's choice.
//
// Status word (R_STATUS): bit 0 Ready Queue not empty, 1 AQ full, 2 AQ empty,
// 3 SM full, 4 TSU idle (no work in flight), 5 cycle counter running,
// bits 15:8 Firing Queue count, bits 23:16 Waiting Queue count.
// Occupancy word (R_OCCUPANCY): bits 15:0 SM entries in use, bits 31:16 AQ
// entries, so software can keep its live instances within the SM.
module tsu
  import d2cmp_pkg::*;
#(
  parameter int unsigned GM_DEPTH   = 256,
  parameter int unsigned SM_ENTRIES = 64,
  parameter int unsigned AQ_DEPTH   = 16,
  parameter int unsigned WQ_DEPTH   = 16,
  parameter int unsigned FQ_DEPTH   = 16,
  parameter int unsigned CL_DEPTH   = 256
) (
  input  logic     clk,
  input  logic     rst_n,
  input  bus_req_t req,
  output bus_rsp_t rsp,
  output tsu_ev_t  ev
);
  localparam int unsigned GW = $clog2(GM_DEPTH);

  // bus interface <-> units
  logic                        aq_wr_tnum, aq_wr_stat, aq_wr_indx, aq_full, aq_empty;
  logic [31:0]                 wdata;
  logic                        gm_we;
  logic [GW-1:0]               gm_wentry;
  gm_field_e                   gm_wfield;
  logic                        cl_we;
  logic [$clog2(CL_DEPTH)-1:0] cl_waddr;
  logic                        sm_load_valid, sm_load_ready, sm_full;
  logic [$clog2(SM_ENTRIES+1)-1:0] sm_used;
  logic [$clog2(AQ_DEPTH+1)-1:0]   aq_count;
  ready_t                      sm_load_key;
  rc_t                         sm_load_count;
  logic                        rq_valid, rq_pop, cyc_we, cyc_running;
  fire_t                       rq_head;
  logic [31:0]                 cyc_value, status_word, occupancy;
  // PPU <-> TIU, GM
  logic                        wq_valid, wq_ready, ppu_idle, tiu_idle;
  ready_t                      wq_data;
  logic [GW-1:0]               gm_a_entry, gm_b_entry;
  tnum_t                       gm_cons1, gm_cons2;
  rc_t                         gm_rc;
  ptr_t                        gm_ifp, gm_dfp;
  logic [$clog2(WQ_DEPTH+1)-1:0] wq_count;
  logic [$clog2(FQ_DEPTH+1)-1:0] fq_count;

  tsu_bus_if #(.GM_DEPTH(GM_DEPTH), .CL_DEPTH(CL_DEPTH)) u_bus_if (
    .clk, .rst_n, .req, .rsp,
    .aq_wr_tnum, .aq_wr_stat, .aq_wr_indx, .aq_full, .wdata,
    .gm_we, .gm_wentry, .gm_wfield,
    .cl_we, .cl_waddr,
    .sm_load_valid, .sm_load_key, .sm_load_count, .sm_load_ready,
    .rq_valid, .rq_head, .rq_pop,
    .cyc_we, .cyc_value,
    .status_word,
    .occupancy,
    .ev_bus_wait(ev.bus_wait)
  );

  graph_memory #(.DEPTH(GM_DEPTH)) u_gm (
    .clk,
    .wr_en   (gm_we),
    .wr_entry(gm_wentry),
    .wr_field(gm_wfield),
    .wr_data (wdata),
    .a_entry (gm_a_entry),
    .a_cons1 (gm_cons1),
    .a_cons2 (gm_cons2),
    .a_rc    (gm_rc),
    .b_entry (gm_b_entry),
    .b_ifp   (gm_ifp),
    .b_dfp   (gm_dfp)
  );

  post_processing_unit #(
    .GM_DEPTH(GM_DEPTH), .SM_ENTRIES(SM_ENTRIES), .AQ_DEPTH(AQ_DEPTH), .CL_DEPTH(CL_DEPTH)
  ) u_ppu (
    .clk, .rst_n,
    .aq_wr_tnum, .aq_wr_stat, .aq_wr_indx, .wdata, .aq_full, .aq_empty,
    .cl_we, .cl_waddr,
    .sm_load_valid, .sm_load_key, .sm_load_count, .sm_load_ready,
    .gm_entry (gm_a_entry),
    .gm_cons1, .gm_cons2, .gm_rc,
    .wq_valid, .wq_ready, .wq_data,
    .idle       (ppu_idle),
    .sm_full, .sm_used, .aq_count,
    .ev_ack     (ev.ack),
    .ev_list    (ev.list),
    .ev_sm_hit  (ev.sm_hit),
    .ev_sm_alloc(ev.sm_alloc),
    .ev_fire    (ev.fire),
    .ev_stall   (ev.stall)
  );

  thread_issue_unit #(.GM_DEPTH(GM_DEPTH), .WQ_DEPTH(WQ_DEPTH), .FQ_DEPTH(FQ_DEPTH)) u_tiu (
    .clk, .rst_n,
    .wq_valid, .wq_ready, .wq_data,
    .gm_entry(gm_b_entry),
    .gm_ifp, .gm_dfp,
    .rq_valid, .rq_head, .rq_pop,
    .wq_count, .fq_count,
    .idle    (tiu_idle),
    .ev_issue(ev.issue)
  );

  cycle_counter #(.WIDTH(32)) u_cyc (
    .clk, .rst_n,
    .ctrl_we   (cyc_we),
    .ctrl_wdata(wdata[1:0]),
    .running   (cyc_running),
    .value     (cyc_value)
  );

  always_comb begin
    status_word        = '0;
    status_word[0]     = rq_valid;
    status_word[1]     = aq_full;
    status_word[2]     = aq_empty;
    status_word[3]     = sm_full;
    status_word[4]     = ppu_idle && tiu_idle;
    status_word[5]     = cyc_running;
    status_word[15:8]  = 8'(fq_count);
    status_word[23:16] = 8'(wq_count);
    occupancy          = {16'(aq_count), 16'(sm_used)};
  end

endmodule
