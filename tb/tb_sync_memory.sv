// tb_sync_memory: self-checking test of the Synchronization Memory. Fills all
// entries with distinct {Thread#, Index} instances through the free-entry
// output, checks lookups of every instance and of missing ones, the full flag
// and used count, count updates, and release and reuse of entries.
module tb_sync_memory;
  import d2cmp_pkg::*;
  localparam int unsigned ENTRIES = 64;
  localparam int unsigned SW = $clog2(ENTRIES);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  ready_t lk_key = '0, wr_key = '0;
  logic lk_hit, free_avail, full, wr_en = 0, wr_valid = 0;
  logic [SW-1:0] lk_idx, free_idx, wr_idx = '0;
  rc_t lk_count, wr_count = '0;
  logic [$clog2(ENTRIES+1)-1:0] used;
  rc_t exp_count [ENTRIES];

  sync_memory #(.ENTRIES(ENTRIES)) dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic ready_t key_of(input int i);
    return '{tnum: tnum_t'(16'h0030 + (i % 5)), index: index_t'(i / 5)};
  endfunction

  task automatic write(input int idx, input bit v, input ready_t k, input rc_t c);
    wr_en = 1; wr_idx = SW'(idx); wr_valid = v; wr_key = k; wr_count = c;
    @(posedge clk); #1 wr_en = 0;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk); #1 rst_n = 1'b1;
    check(used == 0 && !full && free_avail && free_idx == 0, "empty after reset");
    for (int i = 0; i < ENTRIES; i++) begin
      check(free_avail && int'(free_idx) == i, $sformatf("free entry %0d", i));
      exp_count[i] = rc_t'(1 + (i % 15));
      write(int'(free_idx), 1'b1, key_of(i), exp_count[i]);
    end
    check(full && !free_avail && used == ENTRIES, "full after filling");
    for (int i = 0; i < ENTRIES; i++) begin
      lk_key = key_of(i); #1;
      check(lk_hit && int'(lk_idx) == i && lk_count == exp_count[i], $sformatf("lookup %0d", i));
    end
    lk_key = '{tnum: 16'h0031, index: 16'hFFFF}; #1;
    check(!lk_hit, "missing instance does not hit");
    // decrement entry 10
    lk_key = key_of(10); #1;
    write(int'(lk_idx), 1'b1, lk_key, lk_count - 1'b1);
    #1 check(lk_hit && lk_count == exp_count[10] - 1'b1, "count updated");
    // release entries 20 and 7, reuse the lowest
    write(20, 1'b0, key_of(20), '0);
    write(7, 1'b0, key_of(7), '0);
    lk_key = key_of(20); #1;
    check(!lk_hit && free_avail && free_idx == 7 && used == ENTRIES - 2, "release");
    write(7, 1'b1, '{tnum: 16'h0099, index: 16'd3}, 4'd2);
    lk_key = '{tnum: 16'h0099, index: 16'd3}; #1;
    check(lk_hit && lk_idx == 7 && lk_count == 2 && free_idx == 20, "reuse of freed entry");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
