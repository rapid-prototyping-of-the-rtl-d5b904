// tb_firing_queue: self-checking test of the Firing Queue / Ready Queue head.
// Random pushes and Ready Queue pops are compared with a queue model; the head
// entry {Thread#, Index, IFP, DFP} and the flags are checked every cycle, and a
// pop of an empty queue must change nothing.
module tb_firing_queue;
  import d2cmp_pkg::*;
  localparam int unsigned DEPTH = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic enq_valid = 0, rq_pop = 0, enq_ready, rq_valid;
  fire_t enq_data = '0, rq_head;
  logic [$clog2(DEPTH+1)-1:0] count;
  fire_t model [$];
  int n_full = 0, n_empty_pop = 0;

  firing_queue #(.DEPTH(DEPTH)) dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk); #1 rst_n = 1'b1;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      enq_valid = ($urandom % 100) < ((cyc % 400) < 200 ? 80 : 25);
      rq_pop    = ($urandom % 100) < ((cyc % 400) < 200 ? 30 : 80);
      enq_data  = '{tnum: tnum_t'($urandom), index: index_t'($urandom),
                    ifp: ptr_t'($urandom), dfp: ptr_t'($urandom)};
      #1;
      check(count == model.size(), "count");
      check(enq_ready == (model.size() < DEPTH), "enq_ready");
      check(rq_valid == (model.size() > 0), "rq_valid");
      if (model.size() > 0) check(rq_head == model[0], "head entry");
      if (!enq_ready) n_full++;
      if (rq_pop && !rq_valid) n_empty_pop++;
      @(posedge clk);
      if (rq_pop && model.size() > 0) void'(model.pop_front());
      if (enq_valid && enq_ready) model.push_back(enq_data);
      #1;
    end
    check(n_full > 0 && n_empty_pop > 0, "full and empty-pop cases reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
