// graph_memory: Graph Memory (GM) of the TSU, one synchronization template per
// thread.
//
// Entry e holds the template of the thread whose Thread# has e as its low
// bits: IFP (32 bits), DFP (32 bits), Ready Count (4 bits, the initial number
// of producers) and two 16-bit consumer fields. DEPTH is 256 entries, as in the
// prototype. The processor loads the templates field by field through wr_*.
//
// The PPU and the TIU each use one read port, as the document draws the GM in
// both units: port A returns the consumer fields and Ready Count, port B the
// IFP and DFP. Both reads are synchronous (block-RAM style): the address given
// in cycle t is answered in cycle t+1. A write and a read of the same entry in
// the same cycle return the old contents.
module graph_memory
  import d2cmp_pkg::*;
#(
  parameter int unsigned DEPTH = 256
) (
  input  logic                     clk,
  // write port (template loading)
  input  logic                     wr_en,
  input  logic [$clog2(DEPTH)-1:0] wr_entry,
  input  gm_field_e                wr_field,
  input  logic [31:0]              wr_data,
  // read port A: PPU
  input  logic [$clog2(DEPTH)-1:0] a_entry,
  output tnum_t                    a_cons1,
  output tnum_t                    a_cons2,
  output rc_t                      a_rc,
  // read port B: TIU
  input  logic [$clog2(DEPTH)-1:0] b_entry,
  output ptr_t                     b_ifp,
  output ptr_t                     b_dfp
);
  ptr_t  ifp_mem  [DEPTH];
  ptr_t  dfp_mem  [DEPTH];
  tnum_t c1_mem   [DEPTH];
  tnum_t c2_mem   [DEPTH];
  rc_t   rc_mem   [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) begin
      unique case (wr_field)
        GM_IFP:  ifp_mem[wr_entry] <= wr_data;
        GM_DFP:  dfp_mem[wr_entry] <= wr_data;
        GM_CONS: begin
          c1_mem[wr_entry] <= wr_data[31:16];
          c2_mem[wr_entry] <= wr_data[15:0];
        end
        GM_RC:   rc_mem[wr_entry] <= wr_data[RC_W-1:0];
      endcase
    end
  end

  always_ff @(posedge clk) begin
    a_cons1 <= c1_mem[a_entry];
    a_cons2 <= c2_mem[a_entry];
    a_rc    <= rc_mem[a_entry];
    b_ifp   <= ifp_mem[b_entry];
    b_dfp   <= dfp_mem[b_entry];
  end

endmodule
