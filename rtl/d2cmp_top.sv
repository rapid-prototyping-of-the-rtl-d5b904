// d2cmp_top: the Data-Driven Chip-Multiprocessor (D2-CMP) in its prototype
// configuration, NODES = 2 processing nodes ("2CPU-2TSU").
//
// Each node is a conventional processor plus its Thread Synchronization Unit.
// The processors are not part of this RTL: each node's processor-side bus
// master port is a port of this module (cpu_req/cpu_rsp), and so is the port of
// the external shared memory (mem_req/mem_rsp). Inside, the shared system bus
// arbitrates between the processors and routes each access to a TSU or to the
// shared memory. Each processor uses its own TSU (TSU n at TSU_BASE + n*0x4000)
// as a memory-mapped device: it reads the next ready thread from the Ready
// Queue, runs it, and writes its completion into the Acknowledgement Queue.
//
// ev brings out every TSU's event strobes; bus_contention pulses when both
// processors want the bus at once. All ports are synchronous to clk (the bus
// clock, at which the TSUs run); rst_n is an asynchronous, active-low reset.
module d2cmp_top
  import d2cmp_pkg::*;
#(
  parameter int unsigned NODES      = 2,
  parameter int unsigned GM_DEPTH   = 256,
  parameter int unsigned SM_ENTRIES = 64,
  parameter int unsigned AQ_DEPTH   = 16,
  parameter int unsigned WQ_DEPTH   = 16,
  parameter int unsigned FQ_DEPTH   = 16,
  parameter int unsigned CL_DEPTH   = 256
) (
  input  logic     clk,
  input  logic     rst_n,
  input  bus_req_t cpu_req [NODES],
  output bus_rsp_t cpu_rsp [NODES],
  output bus_req_t mem_req,
  input  bus_rsp_t mem_rsp,
  output tsu_ev_t  ev [NODES],
  output logic     bus_contention
);
  bus_req_t tsu_req [NODES];
  bus_rsp_t tsu_rsp [NODES];

  system_bus #(.NODES(NODES)) u_bus (
    .clk, .rst_n,
    .m_req  (cpu_req),
    .m_rsp  (cpu_rsp),
    .tsu_req,
    .tsu_rsp,
    .mem_req,
    .mem_rsp,
    .ev_contention(bus_contention)
  );

  for (genvar n = 0; n < NODES; n++) begin : g_node
    tsu #(
      .GM_DEPTH(GM_DEPTH), .SM_ENTRIES(SM_ENTRIES), .AQ_DEPTH(AQ_DEPTH),
      .WQ_DEPTH(WQ_DEPTH), .FQ_DEPTH(FQ_DEPTH), .CL_DEPTH(CL_DEPTH)
    ) u_tsu (
      .clk, .rst_n,
      .req(tsu_req[n]),
      .rsp(tsu_rsp[n]),
      .ev (ev[n])
    );
  end

endmodule
