// tb_consumer_select: self-checking test of the Consumer Select Unit. Loads a
// consumer list, then checks the consumer stream for direct consumers under
// each status, for empty fields and for list walks, with a randomly stalling
// receiver; checks the cycle count of a two-consumer request.
module tb_consumer_select;
  import d2cmp_pkg::*;
  localparam int unsigned CL_DEPTH = 256;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic cl_we = 0, start = 0, busy, list_mode, out_valid, out_ready = 0;
  logic [$clog2(CL_DEPTH)-1:0] cl_waddr = '0;
  tnum_t cl_wdata = '0, cons1 = '0, cons2 = '0, out_tnum;
  status_e status = ST_ALL;
  tnum_t got [$];
  tnum_t list_mem [CL_DEPTH];
  int n_list = 0;

  consumer_select #(.CL_DEPTH(CL_DEPTH)) dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // one request; returns the consumers seen and the cycles until idle
  task automatic run(input tnum_t c1, input tnum_t c2, input status_e s,
                     input bit stall, output int cycles);
    got.delete();
    cons1 = c1; cons2 = c2; status = s; start = 1;
    @(posedge clk); #1 start = 0;
    cycles = 1;
    while (busy) begin
      out_ready = stall ? (($urandom % 3) == 0) : 1'b1;
      #1;
      if (out_valid && out_ready) got.push_back(out_tnum);
      if (out_valid && out_ready && list_mode) n_list++;
      @(posedge clk); #1;
      cycles++;
    end
    out_ready = 0;
  endtask

  task automatic expect_seq(input tnum_t e [$], input string msg);
    check(got == e, $sformatf("%s: got %p exp %p", msg, got, e));
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    tnum_t e [$];
    repeat (2) @(posedge clk); #1 rst_n = 1'b1;
    // consumer lists: at 16: 5 consumers; at 40: 12 consumers; at 100: empty
    for (int i = 0; i < CL_DEPTH; i++) list_mem[i] = '0;
    for (int i = 0; i < 5; i++)  list_mem[16 + i] = tnum_t'(16'h0100 + i);
    for (int i = 0; i < 12; i++) list_mem[40 + i] = tnum_t'(16'h0200 + 3 * i + 1);
    for (int i = 0; i < CL_DEPTH; i++) begin
      cl_we = 1; cl_waddr = 8'(i); cl_wdata = list_mem[i];
      @(posedge clk); #1;
    end
    cl_we = 0;

    run(16'h0034, 16'h0035, ST_ALL, 0, cyc);
    e = '{16'h0034, 16'h0035}; expect_seq(e, "direct, both");
    check(cyc == 3, $sformatf("two direct consumers take 3 cycles, took %0d", cyc));
    run(16'h0034, 16'h0035, ST_CONS1, 1, cyc);
    e = '{16'h0034}; expect_seq(e, "switch, consumer 1");
    run(16'h0034, 16'h0035, ST_CONS2, 1, cyc);
    e = '{16'h0035}; expect_seq(e, "switch, consumer 2");
    run(16'h0034, 16'h0035, ST_NONE, 1, cyc);
    e = '{}; expect_seq(e, "status none");
    run(16'h0036, 16'h0000, ST_ALL, 1, cyc);
    e = '{16'h0036}; expect_seq(e, "single consumer");
    run(16'h0000, 16'h0000, ST_ALL, 0, cyc);
    e = '{}; expect_seq(e, "no consumers");
    check(cyc <= 2, "no consumers finishes at once");
    run(16'h0000, 16'd16, ST_ALL, 1, cyc);
    e = '{}; for (int i = 0; i < 5; i++) e.push_back(list_mem[16 + i]);
    expect_seq(e, "list of 5");
    run(16'h0000, 16'd40, ST_ALL, 1, cyc);
    e = '{}; for (int i = 0; i < 12; i++) e.push_back(list_mem[40 + i]);
    expect_seq(e, "list of 12");
    run(16'h0000, 16'd100, ST_ALL, 0, cyc);
    e = '{}; expect_seq(e, "empty list");
    check(n_list == 17, $sformatf("list-mode consumers %0d", n_list));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
