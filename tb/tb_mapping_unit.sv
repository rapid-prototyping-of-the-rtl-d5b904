// tb_mapping_unit: self-checking test of the SM mapping unit. Random tag sets
// and valid vectors; each search is compared with a reference search for a
// hit, its entry and the lowest free entry.
module tb_mapping_unit;
  import d2cmp_pkg::*;
  localparam int unsigned ENTRIES = 64;
  int checks = 0, failures = 0;

  ready_t key;
  ready_t tags [ENTRIES];
  logic [ENTRIES-1:0] valid;
  logic hit, free_avail;
  logic [$clog2(ENTRIES)-1:0] hit_idx, free_idx;
  int n_hit = 0, n_full = 0;

  mapping_unit #(.ENTRIES(ENTRIES)) dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      int e_hit, e_free;
      // distinct tags; some invalid
      for (int i = 0; i < ENTRIES; i++) tags[i] = '{tnum: tnum_t'(i * 7 + t), index: index_t'(t)};
      for (int i = 0; i < ENTRIES; i++) valid[i] = (t % 10 == 0) ? 1'b1 : (($urandom % 4) != 0);
      if ($urandom % 3 == 0) key = '{tnum: tnum_t'($urandom), index: index_t'(t + 1)};  // miss
      else key = tags[$urandom % ENTRIES];
      #1;
      e_hit = -1; e_free = -1;
      for (int i = ENTRIES - 1; i >= 0; i--) begin
        if (valid[i] && tags[i] == key) e_hit = i;
        if (!valid[i]) e_free = i;
      end
      check(hit == (e_hit >= 0), $sformatf("hit flag t=%0d", t));
      if (e_hit >= 0) begin check(int'(hit_idx) == e_hit, "hit entry"); n_hit++; end
      check(free_avail == (e_free >= 0), "free flag");
      if (e_free >= 0) check(int'(free_idx) == e_free, "free entry");
      else n_full++;
      #9;
    end
    check(n_hit > 0 && n_full > 0, "hits and full cases reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
