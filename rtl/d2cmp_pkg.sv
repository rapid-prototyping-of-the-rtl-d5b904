// d2cmp_pkg: types and constants shared by the D2-CMP Thread Synchronization
// Unit (TSU) and its system bus.
//
// Field widths of the synchronization template follow the DDM model: a 32-bit
// Instruction Frame Pointer (IFP), a 32-bit Data Frame Pointer (DFP), a 4-bit
// Ready Count (at most 15 producers) and 16-bit consumer fields. A thread number
// (Thread#) is 16 bits, the width of a consumer field; its low 8 bits address
// the 256-entry Graph Memory. The 16-bit instance Index, the status encoding,
// the bus protocol and the register map are choices of this design.
package d2cmp_pkg;

  localparam int unsigned TNUM_W  = 16;   // Thread# = {Context, Block, ThreadID}
  localparam int unsigned INDEX_W = 16;   // instance (loop iteration) index
  localparam int unsigned STAT_W  = 2;    // completion status of a thread
  localparam int unsigned PTR_W   = 32;   // IFP and DFP
  localparam int unsigned RC_W    = 4;    // Ready Count
  localparam int unsigned BUS_AW  = 32;
  localparam int unsigned BUS_DW  = 32;

  typedef logic [TNUM_W-1:0]  tnum_t;
  typedef logic [INDEX_W-1:0] index_t;
  typedef logic [PTR_W-1:0]   ptr_t;
  typedef logic [RC_W-1:0]    rc_t;

  // Completion status written with an acknowledgement. A switch thread
  // reports its predicate so that only one of its two consumers is updated.
  typedef enum logic [STAT_W-1:0] {
    ST_ALL   = 2'd0,   // update every consumer
    ST_CONS1 = 2'd1,   // predicate selected consumer 1 only
    ST_CONS2 = 2'd2,   // predicate selected consumer 2 only
    ST_NONE  = 2'd3    // update no consumer
  } status_e;

  // Entry of the Acknowledgement Queue.
  typedef struct packed {
    tnum_t   tnum;
    status_e status;
    index_t  index;
  } ack_t;

  // Entry of the Waiting Queue: a thread instance whose Ready Count reached 0.
  typedef struct packed {
    tnum_t  tnum;
    index_t index;
  } ready_t;

  // Entry of the Firing Queue / Ready Queue registers.
  typedef struct packed {
    tnum_t  tnum;
    index_t index;
    ptr_t   ifp;
    ptr_t   dfp;
  } fire_t;

  // Synchronization template fields kept in the Graph Memory.
  typedef enum logic [1:0] {
    GM_IFP  = 2'd0,
    GM_DFP  = 2'd1,
    GM_CONS = 2'd2,    // {Cons1, Cons2}
    GM_RC   = 2'd3     // Ready Count
  } gm_field_e;

  // One-cycle event strobes of a TSU, brought out for performance monitoring.
  typedef struct packed {
    logic ack;        // PPU took an acknowledgement from the AQ
    logic list;       // a consumer came from a consumer list
    logic sm_hit;     // a consumer's instance was found in the SM
    logic sm_alloc;   // a new SM entry was allocated
    logic fire;       // a consumer's Ready Count reached zero
    logic stall;      // PPU waited: WQ full or SM full
    logic issue;      // TIU moved a thread into the Firing Queue
    logic bus_wait;   // a bus access waited: AQ full or SM load pending
  } tsu_ev_t;

  // Simple word bus: the master holds a request until it sees ack for one cycle.
  typedef struct packed {
    logic              valid;
    logic              we;
    logic [BUS_AW-1:0] addr;    // byte address, word aligned
    logic [BUS_DW-1:0] wdata;
  } bus_req_t;

  typedef struct packed {
    logic              ack;
    logic [BUS_DW-1:0] rdata;
  } bus_rsp_t;

  // System address map: TSU n occupies 16 KiB at TSU_BASE + n*0x4000;
  // everything outside TSU_BASE..TSU_BASE+0xFFFFF goes to the shared memory.
  localparam logic [BUS_AW-1:0] TSU_BASE = 32'hC000_0000;

  // TSU register map: word offsets (byte address bits [13:2]).
  localparam logic [11:0] R_AQ_TNUM  = 12'h000;  // W: Thread# of completed thread
  localparam logic [11:0] R_AQ_STAT  = 12'h001;  // W: status
  localparam logic [11:0] R_AQ_INDX  = 12'h002;  // W: index; pushes the AQ entry
  localparam logic [11:0] R_RQ_TNUM  = 12'h004;  // R: Thread# at the RQ head
  localparam logic [11:0] R_RQ_INDX  = 12'h005;  // R: index at the RQ head
  localparam logic [11:0] R_RQ_IPTR  = 12'h006;  // R: IFP at the RQ head, pops it (0 if empty)
  localparam logic [11:0] R_RQ_DPTR  = 12'h007;  // R: DFP at the RQ head
  localparam logic [11:0] R_STATUS   = 12'h008;  // R: TSU status word
  localparam logic [11:0] R_CYC_CTRL = 12'h009;  // W: bit0 run, bit1 clear
  localparam logic [11:0] R_CYC_VAL  = 12'h00A;  // R: cycle counter
  localparam logic [11:0] R_OCCUPANCY = 12'h00B; // R: [15:0] SM entries in use, [31:16] AQ entries
  localparam logic [11:0] R_SM_KEY   = 12'h00C;  // W: {Thread#, Index} for an SM load
  localparam logic [11:0] R_SM_LOAD  = 12'h00D;  // W: Ready Count; loads the SM entry
  localparam logic [11:0] R_GM_BASE  = 12'h400;  // W: GM entry e, field f at 0x400 + 4e + f
  localparam logic [11:0] R_CL_BASE  = 12'h800;  // W: consumer list word i at 0x800 + i

endpackage
