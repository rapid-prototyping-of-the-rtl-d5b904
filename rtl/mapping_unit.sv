// mapping_unit: associative lookup for the Synchronization Memory.
//
// Every thread instance that is waiting for producers owns one SM entry,
// tagged with its {Thread#, Index}. Given a key, the mapping unit compares it
// with the tags of all valid entries at once (content-addressable search) and
// returns whether it hit and the matching entry. It also returns the
// lowest-numbered free entry, which is where a new instance is placed.
// Purely combinational.
//
// The document names this unit and makes the SM a CAM; the search and the
// lowest-free-entry choice are this design's.
module mapping_unit
  import d2cmp_pkg::*;
#(
  parameter int unsigned ENTRIES = 64
) (
  input  ready_t                     key,
  input  ready_t                     tags  [ENTRIES],
  input  logic [ENTRIES-1:0]         valid,
  output logic                       hit,
  output logic [$clog2(ENTRIES)-1:0] hit_idx,
  output logic                       free_avail,
  output logic [$clog2(ENTRIES)-1:0] free_idx
);
  logic [ENTRIES-1:0] match;

  always_comb begin
    for (int i = 0; i < ENTRIES; i++) match[i] = valid[i] && (tags[i] == key);
  end

  // Lowest matching entry (at most one matches while the SM is used correctly).
  always_comb begin
    hit     = 1'b0;
    hit_idx = '0;
    for (int i = ENTRIES-1; i >= 0; i--) begin
      if (match[i]) begin
        hit     = 1'b1;
        hit_idx = ($clog2(ENTRIES))'(i);
      end
    end
  end

  always_comb begin
    free_avail = 1'b0;
    free_idx   = '0;
    for (int i = ENTRIES-1; i >= 0; i--) begin
      if (!valid[i]) begin
        free_avail = 1'b1;
        free_idx   = ($clog2(ENTRIES))'(i);
      end
    end
  end

endmodule
