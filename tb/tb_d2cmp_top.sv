// tb_d2cmp_top: end-to-end test of the two-node D2-CMP at its default sizes.
// Two behavioural processors (ddm_cpu) share the system bus and an external
// memory model; each runs data-driven matrix-multiplication jobs on its own
// TSU: node 0 a single one-point thread (MAC1), then 8 threads of 16 points,
// then 64 threads of 4 points (more ready threads than the Waiting and Firing
// Queues hold, so the PPU must wait and the processor must hold back
// acknowledgements while the Acknowledgement Queue is full). The TSU holding
// a bus access (AQ full, SM load behind the PPU) is counted and printed but
// not required: this program never provokes it, the unit tests of the TSU do. node 1 a single
// 16-point thread (MAC16) and then 16 threads of 16 points; two outer
// iterations each. Every result in shared memory is checked
// against the reference, and every mechanism of the TSU and of the bus must
// have happened at least once. Prints the cycle counts measured by the TSUs'
// cycle counters.
module tb_d2cmp_top;
  import d2cmp_pkg::*;
  localparam int unsigned NODES = 2, ITERS = 2;
  localparam int unsigned NTHR0 [3] = '{1, 8, 64};
  localparam int unsigned NPTS0 [3] = '{1, 16, 4};
  localparam int unsigned NTHR1 [2] = '{1, 16};
  localparam int unsigned NPTS1 [2] = '{16, 16};

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  bus_req_t cpu_req [NODES];
  bus_rsp_t cpu_rsp [NODES];
  bus_req_t mem_req;
  bus_rsp_t mem_rsp;
  tsu_ev_t  ev [NODES];
  logic     bus_contention;
  logic     done [NODES];

  d2cmp_top dut (.*);

  ddm_cpu #(.NODE(0), .NJOBS(3), .ITERS(ITERS), .NTHR(NTHR0), .NPTS(NPTS0)) u_cpu0 (
    .clk, .rst_n, .req(cpu_req[0]), .rsp(cpu_rsp[0]), .done(done[0]));
  ddm_cpu #(.NODE(1), .NJOBS(2), .ITERS(ITERS), .NTHR(NTHR1), .NPTS(NPTS1)) u_cpu1 (
    .clk, .rst_n, .req(cpu_req[1]), .rsp(cpu_rsp[1]), .done(done[1]));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // shared memory model: answers one or two cycles after a request
  logic [31:0] mem [logic [31:0]];
  int mem_wait = 0;
  initial mem_rsp = '0;
  always @(posedge clk) begin
    mem_rsp.ack <= 1'b0;
    if (mem_req.valid && !mem_rsp.ack) begin
      if (mem_wait == 0) mem_wait = 1 + $urandom % 2;
      mem_wait--;
      if (mem_wait == 0) begin
        if (mem_req.we) mem[mem_req.addr] = mem_req.wdata;
        mem_rsp.rdata <= mem.exists(mem_req.addr) ? mem[mem_req.addr] : 32'h0;
        mem_rsp.ack   <= 1'b1;
      end
    end
  end

  // mechanism counters
  int n_ack = 0, n_list = 0, n_hit = 0, n_alloc = 0, n_fire = 0, n_issue = 0, n_cont = 0,
      n_stall = 0, n_wait = 0;
  always @(posedge clk) if (rst_n) begin
    for (int n = 0; n < NODES; n++) begin
      n_ack   += int'(ev[n].ack);
      n_list  += int'(ev[n].list);
      n_hit   += int'(ev[n].sm_hit);
      n_alloc += int'(ev[n].sm_alloc);
      n_fire  += int'(ev[n].fire);
      n_issue += int'(ev[n].issue);
      n_stall += int'(ev[n].stall);
      n_wait  += int'(ev[n].bus_wait);
    end
    n_cont += int'(bus_contention);
  end

  function automatic logic [31:0] ref_out(input int node, input int j, input int i, input int npts);
    logic [31:0] s;
    s = 0;
    for (int k = 0; k < npts; k++)
      s += 32'(node * 7 + j * 3 + k + 1) * 32'((i * 3 + k * 5 + j + node) % 17);
    return s;
  endfunction

  // the result region is reused by the next job: check each job's results
  // while the other node may still be running, right after the job ends
  task automatic check_job(input int node, input int j, input int nthr, input int npts);
    for (int it = 0; it < ITERS; it++)
      for (int i = 0; i < nthr; i++) begin
        logic [31:0] a;
        a = 32'h1000_0000 + 32'(node) * 32'h0001_0000 + 32'hC000 + 32'(it * 256 + i) * 4;
        check(mem.exists(a) && mem[a] == ref_out(node, j, i, npts),
              $sformatf("node %0d job %0d iteration %0d A[%0d]", node, j, it, i));
        mem.delete(a);
      end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk); #1 rst_n = 1'b1;
    fork
      begin
        for (int j = 0; j < 3; j++) begin
          wait (u_cpu0.n_sw_exit == j + 1); repeat (2) @(posedge clk); check_job(0, j, NTHR0[j], NPTS0[j]);
        end
      end
      begin
        for (int j = 0; j < 2; j++) begin
          wait (u_cpu1.n_sw_exit == j + 1); repeat (2) @(posedge clk); check_job(1, j, NTHR1[j], NPTS1[j]);
        end
      end
    join
    wait (done[0] && done[1]);
    // threads run: per job ITERS*(fork + MAC threads + joins + switch) + return
    check(u_cpu0.n_threads == ITERS * (1 + 1 + 1 + 1) + 1 + ITERS * (1 + 8 + 1 + 1) + 1 + ITERS * (1 + 64 + 8 + 1) + 1,
          $sformatf("node 0 ran %0d threads", u_cpu0.n_threads));
    check(u_cpu1.n_threads == ITERS * (1 + 1 + 1 + 1) + 1 + ITERS * (1 + 16 + 2 + 1) + 1,
          $sformatf("node 1 ran %0d threads", u_cpu1.n_threads));
    check(n_fire == n_issue && n_issue == u_cpu0.n_threads + u_cpu1.n_threads,
          $sformatf("fired %0d issued %0d", n_fire, n_issue));
    // mechanisms
    check(n_list > 0,  "consumer list walked");
    check(n_hit > 0,   "SM hit (ready count decremented)");
    check(n_alloc > 0, "SM entry allocated for a new instance");
    check(u_cpu0.n_preload + u_cpu1.n_preload > 0, "SM preloaded by software");
    check(u_cpu0.n_sw_loop + u_cpu1.n_sw_loop > 0 && u_cpu0.n_sw_exit + u_cpu1.n_sw_exit == 5,
          "switch thread took both branches");
    check(u_cpu0.n_polls + u_cpu1.n_polls > 0, "processor found the Ready Queue empty");
    check(n_cont > 0, "both processors wanted the bus at once");
    check(n_stall > 0, "PPU waited for room in the Waiting Queue");
    check(u_cpu0.n_deferred + u_cpu1.n_deferred > 0, "acknowledgement held back while the AQ was full");
    $display("mechanisms: acks %0d, list consumers %0d, SM hits %0d, SM allocations %0d, fired %0d, RQ-empty polls %0d, bus contention %0d, PPU stall cycles %0d, held bus cycles %0d, deferred acks %0d",
             n_ack, n_list, n_hit, n_alloc, n_fire, u_cpu0.n_polls + u_cpu1.n_polls, n_cont,
             n_stall, n_wait, u_cpu0.n_deferred + u_cpu1.n_deferred);
    $display("node 0: MAC1 job %0d cycles (TSU init %0d), 8x16 job %0d cycles (TSU init %0d), 64x4 job %0d cycles",
             u_cpu0.job_cycles[0], u_cpu0.init_cycles[0], u_cpu0.job_cycles[1], u_cpu0.init_cycles[1],
             u_cpu0.job_cycles[2]);
    $display("node 1: MAC16 job %0d cycles (TSU init %0d), 16x16 job %0d cycles (TSU init %0d)",
             u_cpu1.job_cycles[0], u_cpu1.init_cycles[0], u_cpu1.job_cycles[1], u_cpu1.init_cycles[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
