// sync_memory: Synchronization Memory (SM) of the TSU, a content-addressable
// store of Ready Counts, one entry per waiting thread instance.
//
// An entry holds a valid bit, the tag {Thread#, Index} and the instance's
// remaining Ready Count. ENTRIES is 64, as in the prototype. Separate
// instances of one thread (loop iterations, invocations) get separate
// entries. The mapping unit searches the tags for the looked-up key and also
// names a free entry.
//
// Interface: lk_key is answered combinationally by lk_hit/lk_idx/lk_count and
// free_avail/free_idx. One write per cycle: wr_en writes entry wr_idx with
// {wr_valid, wr_key, wr_count}; wr_valid = 0 releases the entry. The write
// takes effect at the next clock edge. full is high when no entry is free.
module sync_memory
  import d2cmp_pkg::*;
#(
  parameter int unsigned ENTRIES = 64
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  ready_t                     lk_key,
  output logic                       lk_hit,
  output logic [$clog2(ENTRIES)-1:0] lk_idx,
  output rc_t                        lk_count,
  output logic                       free_avail,
  output logic [$clog2(ENTRIES)-1:0] free_idx,
  output logic                       full,
  output logic [$clog2(ENTRIES+1)-1:0] used,
  input  logic                       wr_en,
  input  logic [$clog2(ENTRIES)-1:0] wr_idx,
  input  logic                       wr_valid,
  input  ready_t                     wr_key,
  input  rc_t                        wr_count
);
  logic [ENTRIES-1:0] valid_q;
  ready_t             tag_q   [ENTRIES];
  rc_t                count_q [ENTRIES];

  mapping_unit #(.ENTRIES(ENTRIES)) u_map (
    .key       (lk_key),
    .tags      (tag_q),
    .valid     (valid_q),
    .hit       (lk_hit),
    .hit_idx   (lk_idx),
    .free_avail(free_avail),
    .free_idx  (free_idx)
  );

  assign lk_count = count_q[lk_idx];
  assign full     = !free_avail;

  always_comb begin
    used = '0;
    for (int i = 0; i < ENTRIES; i++) used += valid_q[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     valid_q <= '0;
    else if (wr_en) valid_q[wr_idx] <= wr_valid;
  end

  always_ff @(posedge clk) begin
    if (wr_en) begin
      tag_q[wr_idx]   <= wr_key;
      count_q[wr_idx] <= wr_count;
    end
  end

endmodule
