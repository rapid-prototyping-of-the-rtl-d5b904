// tb_system_bus: self-checking test of the shared system bus with two masters,
// two TSU-window slaves and a shared-memory slave, all modelled in the
// testbench as simple memories with random answer delays. Both masters issue
// random reads and writes to all windows at the same time; every read must
// return what the same master last wrote (each master owns its addresses), every
// access must reach exactly the slave its address selects, and simultaneous
// requests must be served in turn (contention counted).
module tb_system_bus;
  import d2cmp_pkg::*;
  localparam int unsigned NODES = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  bus_req_t m_req [NODES];
  bus_rsp_t m_rsp [NODES];
  bus_req_t tsu_req [NODES];
  bus_rsp_t tsu_rsp [NODES];
  bus_req_t mem_req;
  bus_rsp_t mem_rsp;
  logic ev_contention;
  int n_cont = 0;

  system_bus #(.NODES(NODES)) dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // slave models: slave s = 0..NODES-1 are TSU windows, NODES is memory
  logic [31:0] smem [NODES+1][logic [31:0]];
  int          hits [NODES+1];
  bus_req_t    sreq [NODES+1];
  bus_rsp_t    srsp [NODES+1];
  always_comb begin
    for (int s = 0; s < NODES; s++) begin sreq[s] = tsu_req[s]; tsu_rsp[s] = srsp[s]; end
    sreq[NODES] = mem_req;
    mem_rsp     = srsp[NODES];
  end

  for (genvar s = 0; s <= NODES; s++) begin : g_slave
    int wait_n = 0;
    bit busy = 0;
    initial srsp[s] = '0;
    always @(posedge clk) begin
      srsp[s].ack <= 1'b0;
      if (sreq[s].valid && !srsp[s].ack) begin
        if (!busy) begin busy = 1; wait_n = $urandom % 3; end
        if (wait_n == 0) begin
          busy = 0;
          hits[s]++;
          if (s < NODES)
            check(sreq[s].addr >= TSU_BASE + 32'(s) * 32'h4000 &&
                  sreq[s].addr <  TSU_BASE + 32'(s + 1) * 32'h4000,
                  $sformatf("TSU %0d got address %h", s, sreq[s].addr));
          else
            check(sreq[s].addr < TSU_BASE, $sformatf("memory got address %h", sreq[s].addr));
          if (sreq[s].we) smem[s][sreq[s].addr] = sreq[s].wdata;
          srsp[s].rdata <= smem[s].exists(sreq[s].addr) ? smem[s][sreq[s].addr] : 32'hBAD0_BAD0;
          srsp[s].ack   <= 1'b1;
        end else wait_n--;
      end
    end
  end

  always @(posedge clk) if (rst_n && ev_contention) n_cont++;

  // masters
  int done_n = 0;
  for (genvar m = 0; m < NODES; m++) begin : g_master
    logic [31:0] shadow [logic [31:0]];
    initial begin
      m_req[m] = '0;
      @(posedge rst_n);
      repeat (2) @(posedge clk);
      for (int k = 0; k < 400; k++) begin
        int s;
        logic [31:0] a;
        bit we;
        s = $urandom % (NODES + 1);
        a = (s < NODES) ? (TSU_BASE + 32'(s) * 32'h4000 + 32'(m * 64 + ($urandom % 16)) * 4)
                        : (32'h1000_0000 + 32'(m * 64 + ($urandom % 16)) * 4);
        we = !shadow.exists(a) || ($urandom % 2);
        #1 m_req[m] = '{valid: 1'b1, we: we, addr: a, wdata: $urandom};
        do @(posedge clk); while (!m_rsp[m].ack);
        if (we) shadow[a] = m_req[m].wdata;
        else check(m_rsp[m].rdata == shadow[a], $sformatf("master %0d read %h", m, a));
        #1 m_req[m] = '0;
        if ($urandom % 2) @(posedge clk);
      end
      done_n++;
    end
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk); #1 rst_n = 1'b1;
    wait (done_n == NODES);
    repeat (5) @(posedge clk);
    check(hits[0] + hits[1] + hits[2] == 800, $sformatf("every access served once: %0d",
          hits[0] + hits[1] + hits[2]));
    check(hits[0] > 0 && hits[1] > 0 && hits[2] > 0, "all slaves reached");
    check(n_cont > 0, $sformatf("contention happened %0d times", n_cont));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
