// tsu_bus_if: the TSU's interface to the system network, a memory-mapped bus
// slave.
//
// The processor talks to the TSU only through loads and stores to the TSU's
// address window, so no processor change is needed. This unit decodes those
// accesses (word offset = address bits [13:2], map in d2cmp_pkg):
//   writes: AqTNum, AqStat, AqIndx (pushes an acknowledgement), cycle counter
//           control, SM key and SM load, Graph Memory template fields, and
//           consumer-list words;
//   reads:  RqTNum, RqIndx, RqIptr (pops the Ready Queue head), RqDptr, the
//           status word, the occupancy word and the cycle counter.
// Reading the Ready Queue while it is empty returns zeros and pops nothing.
//
// Bus protocol (this design's own, standing in for the FPGA vendor's
// processor bus): the master holds valid/we/addr/wdata until it sees ack for
// one cycle; read data comes with ack. Most accesses are answered the cycle
// after they appear. A write of AqIndx waits while the AQ is full, and an SM
// load waits until the PPU has performed it; the bus access is held meanwhile.
// Because a held access blocks the shared bus, software should write AqIndx
// only while the status word shows room in the AQ: if the PPU is waiting for
// the processor to take ready threads, a held AqIndx write never completes.
module tsu_bus_if
  import d2cmp_pkg::*;
#(
  parameter int unsigned GM_DEPTH = 256,
  parameter int unsigned CL_DEPTH = 256
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  bus_req_t                    req,
  output bus_rsp_t                    rsp,
  // acknowledgement queue
  output logic                        aq_wr_tnum,
  output logic                        aq_wr_stat,
  output logic                        aq_wr_indx,
  input  logic                        aq_full,
  output logic [31:0]                 wdata,
  // Graph Memory loading
  output logic                        gm_we,
  output logic [$clog2(GM_DEPTH)-1:0] gm_wentry,
  output gm_field_e                   gm_wfield,
  // consumer-list loading
  output logic                        cl_we,
  output logic [$clog2(CL_DEPTH)-1:0] cl_waddr,
  // Synchronization Memory loading
  output logic                        sm_load_valid,
  output ready_t                      sm_load_key,
  output rc_t                         sm_load_count,
  input  logic                        sm_load_ready,
  // Ready Queue
  input  logic                        rq_valid,
  input  fire_t                       rq_head,
  output logic                        rq_pop,
  // cycle counter
  output logic                        cyc_we,
  input  logic [31:0]                 cyc_value,
  // status word, read at R_STATUS
  input  logic [31:0]                 status_word,
  // occupancy word, read at R_OCCUPANCY
  input  logic [31:0]                 occupancy,
  // an AqIndx write or SM load is waiting
  output logic                        ev_bus_wait
);
  logic [11:0] word;
  logic        fresh, accept, wr, rd;
  logic        ack_q;
  logic [31:0] rdata_q, rdata_d;
  ready_t      sm_key_q;

  assign word  = req.addr[13:2];
  assign fresh = req.valid && !ack_q;
  assign wr    = fresh && req.we;
  assign rd    = fresh && !req.we;
  assign wdata = req.wdata;

  logic is_gm, is_cl;
  assign is_gm = (word >= R_GM_BASE) && (word < R_GM_BASE + 12'(4*GM_DEPTH));
  assign is_cl = (word >= R_CL_BASE) && (word < R_CL_BASE + 12'(CL_DEPTH));

  always_comb begin
    aq_wr_tnum    = 1'b0;
    aq_wr_stat    = 1'b0;
    aq_wr_indx    = 1'b0;
    gm_we         = 1'b0;
    cl_we         = 1'b0;
    sm_load_valid = 1'b0;
    cyc_we        = 1'b0;
    rq_pop        = 1'b0;
    accept        = fresh;
    rdata_d       = '0;
    ev_bus_wait   = 1'b0;
    if (wr) begin
      if (word == R_AQ_TNUM) aq_wr_tnum = 1'b1;
      if (word == R_AQ_STAT) aq_wr_stat = 1'b1;
      if (word == R_AQ_INDX) begin
        aq_wr_indx  = !aq_full;
        accept      = !aq_full;
        ev_bus_wait = aq_full;
      end
      if (word == R_CYC_CTRL) cyc_we = 1'b1;
      if (word == R_SM_LOAD) begin
        sm_load_valid = 1'b1;
        accept        = sm_load_ready;
        ev_bus_wait   = !sm_load_ready;
      end
      if (is_gm) gm_we = 1'b1;
      if (is_cl) cl_we = 1'b1;
    end
    if (rd) begin
      unique case (word)
        R_RQ_TNUM: rdata_d = rq_valid ? 32'(rq_head.tnum)  : '0;
        R_RQ_INDX: rdata_d = rq_valid ? 32'(rq_head.index) : '0;
        R_RQ_IPTR: begin
          rdata_d = rq_valid ? rq_head.ifp : '0;
          rq_pop  = rq_valid;
        end
        R_RQ_DPTR: rdata_d = rq_valid ? rq_head.dfp : '0;
        R_STATUS:  rdata_d = status_word;
        R_CYC_VAL: rdata_d = cyc_value;
        R_OCCUPANCY: rdata_d = occupancy;
        default:   rdata_d = '0;
      endcase
    end
  end

  logic [11:0] gm_off;
  assign gm_off        = word - R_GM_BASE;
  assign gm_wentry     = gm_off[2 +: $clog2(GM_DEPTH)];
  assign gm_wfield     = gm_field_e'(gm_off[1:0]);
  assign cl_waddr      = ($clog2(CL_DEPTH))'(word - R_CL_BASE);
  assign sm_load_key   = sm_key_q;
  assign sm_load_count = req.wdata[RC_W-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ack_q    <= 1'b0;
      rdata_q  <= '0;
      sm_key_q <= '0;
    end else begin
      ack_q   <= accept;
      rdata_q <= rdata_d;
      if (wr && word == R_SM_KEY) sm_key_q <= '{tnum: req.wdata[31:16], index: req.wdata[15:0]};
    end
  end

  assign rsp = '{ack: ack_q, rdata: rdata_q};

endmodule
