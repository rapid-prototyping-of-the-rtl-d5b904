// tb_matmul_granularity: thread-granularity sweep of the matrix-multiplication
// workload on the two-node D2-CMP at its default sizes.
// The same 256 multiply-and-accumulate operations are cut into threads of 2, 4,
// 8 and 16 points (128, 64, 32 and 16 threads per job); both nodes run the sweep at
// the same time, sharing the bus and the memory. Checks every result and that
// the PPU had to wait for room in the Waiting Queue when 64 threads became
// ready at once.
// One point per thread (256 threads) is not run: with one template per thread
// it needs more than the 256 Graph Memory entries. Prints the cycles each job took, measured by the TSU cycle
// counter, to show how larger threads amortise the per-thread overhead.
module tb_matmul_granularity;
  import d2cmp_pkg::*;
  localparam int unsigned NODES = 2, ITERS = 1, NJOBS = 4;
  localparam int unsigned NTHR [NJOBS] = '{128, 64, 32, 16};
  localparam int unsigned NPTS [NJOBS] = '{2, 4, 8, 16};

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

  ddm_cpu #(.NODE(0), .NJOBS(NJOBS), .ITERS(ITERS), .NTHR(NTHR), .NPTS(NPTS)) u_cpu0 (
    .clk, .rst_n, .req(cpu_req[0]), .rsp(cpu_rsp[0]), .done(done[0]));
  ddm_cpu #(.NODE(1), .NJOBS(NJOBS), .ITERS(ITERS), .NTHR(NTHR), .NPTS(NPTS)) u_cpu1 (
    .clk, .rst_n, .req(cpu_req[1]), .rsp(cpu_rsp[1]), .done(done[1]));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic [31:0] mem [logic [31:0]];
  initial mem_rsp = '0;
  always @(posedge clk) begin
    mem_rsp.ack <= 1'b0;
    if (mem_req.valid && !mem_rsp.ack) begin
      if (mem_req.we) mem[mem_req.addr] = mem_req.wdata;
      mem_rsp.rdata <= mem.exists(mem_req.addr) ? mem[mem_req.addr] : 32'h0;
      mem_rsp.ack   <= 1'b1;
    end
  end

  int n_stall = 0, n_cont = 0;
  always @(posedge clk) if (rst_n) begin
    for (int n = 0; n < NODES; n++) n_stall += int'(ev[n].stall);
    n_cont += int'(bus_contention);
  end

  function automatic logic [31:0] ref_out(input int node, input int j, input int i, input int npts);
    logic [31:0] s;
    s = 0;
    for (int k = 0; k < npts; k++)
      s += 32'(node * 7 + j * 3 + k + 1) * 32'((i * 3 + k * 5 + j + node) % 17);
    return s;
  endfunction

  task automatic check_job(input int node, input int j);
    for (int i = 0; i < int'(NTHR[j]); i++) begin
      logic [31:0] a;
      a = 32'h1000_0000 + 32'(node) * 32'h0001_0000 + 32'hC000 + 32'(i) * 4;
      check(mem.exists(a) && mem[a] == ref_out(node, j, i, NPTS[j]),
            $sformatf("node %0d job %0d A[%0d]", node, j, i));
      mem.delete(a);
    end
  endtask

  initial begin
    repeat (1500000) @(posedge clk);
    failures++;
    $display("timeout: threads run %0d/%0d, polls %0d/%0d, exits %0d/%0d", u_cpu0.n_threads, u_cpu1.n_threads,
             u_cpu0.n_polls, u_cpu1.n_polls, u_cpu0.n_sw_exit, u_cpu1.n_sw_exit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar n = 0; n < NODES; n++) begin : g_chk
    initial begin
      wait (rst_n);
      for (int j = 0; j < NJOBS; j++) begin
        if (n == 0) wait (u_cpu0.n_sw_exit == j + 1); else wait (u_cpu1.n_sw_exit == j + 1);
        repeat (2) @(posedge clk);
        check_job(n, j);
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk); #1 rst_n = 1'b1;
    wait (done[0] && done[1]);
    repeat (20) @(posedge clk);
    check(n_stall > 0, "PPU waited for Waiting Queue room");
    check(n_cont > 0, "bus contention");
    for (int j = 0; j < NJOBS; j++)
      $display("granularity %0d points/thread (%0d threads): node 0 %0d cycles, node 1 %0d cycles",
               NPTS[j], NTHR[j], u_cpu0.job_cycles[j], u_cpu1.job_cycles[j]);
    $display("PPU stall cycles %0d, bus contention %0d", n_stall, n_cont);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
