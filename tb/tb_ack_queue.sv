// tb_ack_queue: self-checking test of the Acknowledgement Queue.
// Writes acknowledgements through the three staging registers, checks that the
// queue returns them in order with the right {Thread#, Status, Index}, that it
// reports full after DEPTH entries and empty after draining, and that
// simultaneous push and pop keep the count.
module tb_ack_queue;
  import d2cmp_pkg::*;
  localparam int unsigned DEPTH = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic wr_tnum = 0, wr_stat = 0, wr_indx = 0, deq_ready = 0;
  logic [31:0] wdata = '0;
  logic full, empty, deq_valid;
  logic [$clog2(DEPTH+1)-1:0] count;
  ack_t deq_data;
  ack_t model [$];

  ack_queue #(.DEPTH(DEPTH)) dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic wr(input int which, input logic [31:0] d);
    wdata = d;
    wr_tnum = (which == 0); wr_stat = (which == 1); wr_indx = (which == 2);
    @(posedge clk); #1;
    wr_tnum = 0; wr_stat = 0; wr_indx = 0;
  endtask

  task automatic push(input tnum_t t, input status_e s, input index_t i);
    wr(0, 32'(t)); wr(1, 32'(s)); wr(2, {16'hDEAD, i});
    model.push_back('{tnum: t, status: s, index: i});
  endtask

  initial begin
    repeat (4000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk); #1 rst_n = 1'b1;
    check(empty && !full && count == 0 && !deq_valid, "empty after reset");
    // fill
    for (int k = 0; k < DEPTH; k++) begin
      push(tnum_t'(16'h0100 + k), status_e'(k % 4), index_t'(k * 3));
      check(count == k + 1, $sformatf("count after push %0d", k));
    end
    check(full, "full after DEPTH pushes");
    // drain with checks
    for (int k = 0; k < DEPTH; k++) begin
      ack_t exp;
      exp = model.pop_front();
      check(deq_valid && deq_data == exp,
            $sformatf("entry %0d got %h exp %h", k, deq_data, exp));
      deq_ready = 1; @(posedge clk); #1 deq_ready = 0;
    end
    check(empty && !deq_valid, "empty after drain");
    // one-cycle visibility and simultaneous push/pop
    push(16'h0031, ST_CONS1, 16'd7);
    check(deq_valid && deq_data.tnum == 16'h0031 && deq_data.status == ST_CONS1 &&
          deq_data.index == 16'd7, "visible one cycle after push");
    wr(0, 32'h0032);
    wdata = 32'd9; wr_indx = 1; deq_ready = 1;
    @(posedge clk); #1 wr_indx = 0; deq_ready = 0;
    void'(model.pop_front());
    model.push_back('{tnum: 16'h0032, status: ST_CONS1, index: 16'd9});
    check(count == 1 && deq_data == model[0], "push and pop in the same cycle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
