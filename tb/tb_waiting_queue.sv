// tb_waiting_queue: self-checking test of the Waiting Queue. Random pushes and
// pops are compared with a queue model; full/empty flags and the count are
// checked every cycle.
module tb_waiting_queue;
  import d2cmp_pkg::*;
  localparam int unsigned DEPTH = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic enq_valid = 0, deq_ready = 0, enq_ready, deq_valid;
  ready_t enq_data = '0, deq_data;
  logic [$clog2(DEPTH+1)-1:0] count;
  ready_t model [$];
  int n_full = 0;

  waiting_queue #(.DEPTH(DEPTH)) dut (.*);

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
      // fill phase first 300 cycles biased to push, then mixed
      enq_valid = ($urandom % 100) < ((cyc % 400) < 200 ? 80 : 30);
      deq_ready = ($urandom % 100) < ((cyc % 400) < 200 ? 30 : 80);
      enq_data  = '{tnum: tnum_t'($urandom), index: index_t'($urandom)};
      #1;
      check(count == model.size(), $sformatf("count %0d exp %0d", count, model.size()));
      check(enq_ready == (model.size() < DEPTH), "enq_ready");
      check(deq_valid == (model.size() > 0), "deq_valid");
      if (deq_valid && model.size() > 0) check(deq_data == model[0], "head data");
      if (!enq_ready) n_full++;
      @(posedge clk);
      if (deq_ready && model.size() > 0) void'(model.pop_front());
      if (enq_valid && enq_ready) model.push_back(enq_data);
      #1;
    end
    check(n_full > 0, "queue reached full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
