// tb_d2cmp_4node: the D2-CMP with four nodes (four processors, four TSUs) on
// the shared bus, the 4CPU-4TSU arrangement the architecture is drawn with.
// All other sizes stay at their defaults. Each behavioural processor runs the
// data-driven matrix multiplication on its own TSU (node n: 8 threads of
// 4 + 4n points, two iterations) at the same time as the others; every result
// is checked against a reference computed here, and bus contention between
// the four masters must occur.
module tb_d2cmp_4node;
  import d2cmp_pkg::*;
  localparam int unsigned NODES = 4, ITERS = 2, NTHR = 8;

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

  d2cmp_top #(.NODES(NODES)) dut (.*);

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

  int n_cont = 0, n_ack [NODES];
  initial foreach (n_ack[n]) n_ack[n] = 0;
  always @(posedge clk) if (rst_n) begin
    n_cont += int'(bus_contention);
    for (int n = 0; n < NODES; n++) n_ack[n] += int'(ev[n].ack);
  end

  function automatic logic [31:0] ref_out(input int node, input int i, input int npts);
    logic [31:0] s;
    s = 0;
    for (int k = 0; k < npts; k++)
      s += 32'(node * 7 + k + 1) * 32'((i * 3 + k * 5 + node) % 17);
    return s;
  endfunction

  for (genvar n = 0; n < NODES; n++) begin : g_node
    localparam int unsigned NP [1] = '{4 + 4 * n};
    localparam int unsigned NT [1] = '{NTHR};
    ddm_cpu #(.NODE(n), .NJOBS(1), .ITERS(ITERS), .NTHR(NT), .NPTS(NP)) u_cpu (
      .clk, .rst_n, .req(cpu_req[n]), .rsp(cpu_rsp[n]), .done(done[n]));
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk); #1 rst_n = 1'b1;
    wait (done[0] && done[1] && done[2] && done[3]);
    repeat (5) @(posedge clk);
    for (int n = 0; n < NODES; n++) begin
      for (int it = 0; it < ITERS; it++)
        for (int i = 0; i < NTHR; i++) begin
          logic [31:0] a;
          a = 32'h1000_0000 + 32'(n) * 32'h0001_0000 + 32'hC000 + 32'(it * 256 + i) * 4;
          check(mem.exists(a) && mem[a] == ref_out(n, i, 4 + 4 * n),
                $sformatf("node %0d iteration %0d A[%0d]", n, it, i));
        end
      // per iteration: fork + MAC threads + 1 join + switch, plus the start
      check(n_ack[n] == ITERS * (1 + NTHR + 1 + 1) + 1, $sformatf("node %0d acknowledgements %0d", n, n_ack[n]));
    end
    check(n_cont > 0, "bus contention among the four processors");
    $display("job cycles: %0d %0d %0d %0d, bus contention %0d", g_node[0].u_cpu.job_cycles[0],
             g_node[1].u_cpu.job_cycles[0], g_node[2].u_cpu.job_cycles[0], g_node[3].u_cpu.job_cycles[0], n_cont);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
