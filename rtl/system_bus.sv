// system_bus: shared system bus of the D2-CMP prototype, connecting the
// processors (masters) to the per-node TSUs and the shared memory (slaves).
//
// The prototype is bus based: both processors, both TSUs and the shared
// external memory sit on one processor bus. This module gives one master at a
// time the bus, in round-robin order among requesting masters, and routes its
// request by address: TSU n answers at TSU_BASE + n*0x4000 (16 KiB each); any
// other address goes to the shared-memory port. The grant is held until the
// slave's ack, which is returned to the owning master.
//
// The arbitration scheme, the address map and the bus protocol are this
// design's; the document only says the system is bus based (and that a crossbar
// is planned, which is not built here).
//
// Timing: a request seen while the bus is free is granted at the next edge and
// forwarded from then on; the bus is free again the cycle after the ack.
// ev_contention pulses when a grant is made while another master also waits.
module system_bus
  import d2cmp_pkg::*;
#(
  parameter int unsigned NODES = 2     // masters, and TSU slaves
) (
  input  logic     clk,
  input  logic     rst_n,
  input  bus_req_t m_req [NODES],
  output bus_rsp_t m_rsp [NODES],
  output bus_req_t tsu_req [NODES],
  input  bus_rsp_t tsu_rsp [NODES],
  output bus_req_t mem_req,
  input  bus_rsp_t mem_rsp,
  output logic     ev_contention
);
  localparam int unsigned MW = (NODES > 1) ? $clog2(NODES) : 1;

  logic          busy_q;
  logic [MW-1:0] owner_q, rr_q, pick;
  logic          any_req;
  int unsigned   n_req;
  bus_req_t      oreq;
  bus_rsp_t      orsp;
  logic          to_tsu;
  logic [MW-1:0] tsu_sel;
  logic [BUS_AW-1:0] off;

  // round-robin choice, starting at rr_q
  always_comb begin
    any_req = 1'b0;
    pick    = '0;
    n_req   = 0;
    for (int k = 0; k < NODES; k++) begin
      if (m_req[k].valid) n_req++;
    end
    for (int k = NODES-1; k >= 0; k--) begin
      int unsigned m;
      m = (int'(rr_q) + k) % NODES;
      if (m_req[m].valid) begin
        any_req = 1'b1;
        pick    = MW'(m);
      end
    end
  end

  // address decode of the owner's request
  assign oreq    = m_req[owner_q];
  assign off     = oreq.addr - TSU_BASE;
  assign to_tsu  = (oreq.addr >= TSU_BASE) && (off < BUS_AW'(NODES * 32'h4000));
  assign tsu_sel = MW'(off >> 14);

  always_comb begin
    for (int s = 0; s < NODES; s++) begin
      tsu_req[s]       = oreq;
      tsu_req[s].valid = busy_q && oreq.valid && to_tsu && (tsu_sel == MW'(s));
    end
    mem_req       = oreq;
    mem_req.valid = busy_q && oreq.valid && !to_tsu;
    orsp          = to_tsu ? tsu_rsp[tsu_sel] : mem_rsp;
    for (int k = 0; k < NODES; k++) begin
      m_rsp[k]     = '{ack: 1'b0, rdata: orsp.rdata};
      m_rsp[k].ack = busy_q && orsp.ack && (owner_q == MW'(k));
    end
  end

  assign ev_contention = !busy_q && (n_req > 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q  <= 1'b0;
      owner_q <= '0;
      rr_q    <= '0;
    end else if (!busy_q) begin
      if (any_req) begin
        busy_q  <= 1'b1;
        owner_q <= pick;
      end
    end else if (orsp.ack) begin
      busy_q <= 1'b0;
      rr_q   <= (owner_q == MW'(NODES-1)) ? '0 : owner_q + 1'b1;
    end
  end

  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
                           busy_q |-> m_req[owner_q].valid);

endmodule
