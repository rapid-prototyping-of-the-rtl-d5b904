// tb_vecmat_contexts: vector-matrix multiplication A[i] = sum_k R[k]*Q[i][k]
// written as two DDM code blocks, an outer loop over columns that starts one
// invocation of an inner-loop block per column, each in its own Context. Runs
// on node 0 of the default-size D2-CMP; the second processor stays idle.
//
// Thread graph (Thread# low byte : role; the Index carries the loop counter):
//   outer block
//     0x11 init (acknowledged once to start the program) -> 0x12 at Index 0
//     0x12 switch[i] -> CONS1: 0x13 inc (i < C_RANGE) | CONS2: 0x14 return
//     0x13 inc[i]    -> acknowledged with Index i+1: 0x12 (next test) and
//                       0x15 new_context
//     0x15 new_context[j] also acknowledges thread 0x30 in Context j: this
//                       starts an invocation of the inner block for column j-1
//   inner block (consumer fields hold Context 0, so each consumer inherits the
//   invocation's Context; the processor finds its column from the Context)
//     0x30 start (never run, only acknowledged) -> 0x31 init -> 0x32 at Index 0
//     0x32 switch[k] -> CONS1: 0x33 mul (k < R_RANGE) | CONS2: 0x36 return
//     0x33 mul[k]    -> 0x34 add and 0x35 inc
//     0x35 inc[k]    -> 0x34 add
//     0x34 add[k]    -> Ready Count 2 (mul and inc); acknowledged with Index
//                       k+1: 0x32 (next test)
// Several inner invocations run at once with identical {thread, Index} pairs;
// only their Contexts keep their SM instances and data apart. Every A[i] is
// checked, as are the numbers of invocations and returns and that instances
// of different Contexts were live in the SM at the same time.
module tb_vecmat_contexts;
  import d2cmp_pkg::*;
  localparam int unsigned NODES = 2, C_RANGE = 6, R_RANGE = 8;
  localparam logic [31:0] TB = TSU_BASE, DB = 32'h1000_0000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  bus_req_t cpu_req [NODES];
  bus_rsp_t cpu_rsp [NODES];
  bus_req_t mem_req;
  bus_rsp_t mem_rsp;
  tsu_ev_t  ev [NODES];
  logic     bus_contention;

  d2cmp_top dut (.*);

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

  // processor 0 bus access
  task automatic bus(input bit we, input logic [31:0] addr, input logic [31:0] d,
                     output logic [31:0] rd);
    @(posedge clk);
    #1 cpu_req[0] = '{valid: 1'b1, we: we, addr: addr, wdata: d};
    do @(posedge clk); while (!cpu_rsp[0].ack);
    rd = cpu_rsp[0].rdata;
    #1 cpu_req[0] = '0;
  endtask
  task automatic st(input logic [31:0] a, input logic [31:0] d);
    logic [31:0] rd;
    bus(1'b1, a, d, rd);
  endtask
  task automatic ld(input logic [31:0] a, output logic [31:0] d);
    bus(1'b0, a, 32'h0, d);
  endtask
  task automatic tsu_wr(input logic [11:0] w, input logic [31:0] d);
    st(TB + (32'(w) << 2), d);
  endtask
  task automatic tsu_rd(input logic [11:0] w, output logic [31:0] d);
    ld(TB + (32'(w) << 2), d);
  endtask
  task automatic template(input logic [7:0] e, input logic [31:0] ifp,
                          input logic [15:0] c1, input logic [15:0] c2, input int rc);
    tsu_wr(12'(R_GM_BASE + 4 * e + 0), ifp);
    tsu_wr(12'(R_GM_BASE + 4 * e + 1), DB);
    tsu_wr(12'(R_GM_BASE + 4 * e + 2), {c1, c2});
    tsu_wr(12'(R_GM_BASE + 4 * e + 3), 32'(rc));
  endtask
  // acknowledge only while the AQ has room (no thread waits here: at most a
  // few threads are ready at a time in this program)
  task automatic ack(input logic [15:0] t, input status_e s, input logic [15:0] ix);
    logic [31:0] stw;
    do tsu_rd(R_STATUS, stw); while (stw[1]);
    tsu_wr(R_AQ_TNUM, 32'(t));
    tsu_wr(R_AQ_STAT, 32'(s));
    tsu_wr(R_AQ_INDX, 32'(ix));
  endtask

  function automatic logic [31:0] r_val(input int k);    return 32'(k * 3 + 2); endfunction
  function automatic logic [31:0] q_val(input int i, input int k); return 32'((i * 7 + k * 5) % 13 + 1); endfunction

  int n_ctx = 0, n_inner_ret = 0, max_sm = 0, n_threads = 0;
  bit outer_done = 0;

  always @(posedge clk) if (rst_n) begin
    logic [31:0] occ;
    occ = dut.g_node[0].u_tsu.occupancy;
    if (int'(occ[15:0]) > max_sm) max_sm = int'(occ[15:0]);
  end

  initial begin
    logic [31:0] tn, ix, ip, dp, r, q, p, s;
    int c;
    cpu_req[0] = '0; cpu_req[1] = '0;
    repeat (3) @(posedge clk); #1 rst_n = 1'b1;
    repeat (2) @(posedge clk);
    for (int k = 0; k < R_RANGE; k++) st(DB + 32'(k) * 4, r_val(k));
    for (int i = 0; i < C_RANGE; i++)
      for (int k = 0; k < R_RANGE; k++) st(DB + 32'h1000 + 32'(i * 64 + k) * 4, q_val(i, k));
    // templates: IFP = 0x100 * thread number
    template(8'h11, 32'h1100, 16'h0012, 16'h0000, 1);
    template(8'h12, 32'h1200, 16'h0013, 16'h0014, 1);
    template(8'h13, 32'h1300, 16'h0012, 16'h0015, 1);
    template(8'h14, 32'h1400, 16'h0000, 16'h0000, 1);
    template(8'h15, 32'h1500, 16'h0000, 16'h0000, 1);
    template(8'h30, 32'h3000, 16'h0031, 16'h0000, 1);
    template(8'h31, 32'h3100, 16'h0032, 16'h0000, 1);
    template(8'h32, 32'h3200, 16'h0033, 16'h0036, 1);
    template(8'h33, 32'h3300, 16'h0034, 16'h0035, 1);
    template(8'h34, 32'h3400, 16'h0032, 16'h0000, 2);
    template(8'h35, 32'h3500, 16'h0034, 16'h0000, 1);
    template(8'h36, 32'h3600, 16'h0000, 16'h0000, 1);
    ack(16'h0011, ST_ALL, 16'd0);        // the outer block's init has run
    while (!(outer_done && n_inner_ret == C_RANGE)) begin
      tsu_rd(R_RQ_TNUM, tn);
      if (tn == 0) continue;
      tsu_rd(R_RQ_INDX, ix);
      tsu_rd(R_RQ_DPTR, dp);
      tsu_rd(R_RQ_IPTR, ip);
      n_threads++;
      c = int'(tn[15:8]) - 1;            // column of an inner invocation
      case (ip)
        32'h1200: ack(tn[15:0], (ix < C_RANGE) ? ST_CONS1 : ST_CONS2, ix[15:0]);
        32'h1300: ack(tn[15:0], ST_ALL, ix[15:0] + 16'd1);
        32'h1400: outer_done = 1;
        32'h1500: begin
          n_ctx++;
          ack({ix[7:0], 8'h30}, ST_ALL, 16'd0);   // start an invocation in Context ix
          ack(tn[15:0], ST_ALL, ix[15:0]);
        end
        32'h3100: begin st(dp + 32'hC000 + 32'(c) * 4, 0); ack(tn[15:0], ST_ALL, ix[15:0]); end
        32'h3200: ack(tn[15:0], (ix < R_RANGE) ? ST_CONS1 : ST_CONS2, ix[15:0]);
        32'h3300: begin
          ld(dp + 32'(ix) * 4, r);
          ld(dp + 32'h1000 + 32'(c * 64 + int'(ix)) * 4, q);
          st(dp + 32'h4000 + 32'(c) * 4, r * q);
          ack(tn[15:0], ST_ALL, ix[15:0]);
        end
        32'h3400: begin
          ld(dp + 32'h4000 + 32'(c) * 4, p);
          ld(dp + 32'hC000 + 32'(c) * 4, s);
          st(dp + 32'hC000 + 32'(c) * 4, s + p);
          ack(tn[15:0], ST_ALL, ix[15:0] + 16'd1);
        end
        32'h3600: n_inner_ret++;
        default:  ack(tn[15:0], ST_ALL, ix[15:0]);   // start, init, inc
      endcase
    end
    repeat (5) @(posedge clk);
    for (int i = 0; i < C_RANGE; i++) begin
      logic [31:0] e;
      e = 0;
      for (int k = 0; k < R_RANGE; k++) e += r_val(k) * q_val(i, k);
      check(mem.exists(DB + 32'hC000 + 32'(i) * 4) && mem[DB + 32'hC000 + 32'(i) * 4] == e,
            $sformatf("A[%0d]", i));
    end
    check(n_ctx == C_RANGE, $sformatf("%0d inner invocations started", n_ctx));
    // taken from the Ready Queue (init 0x11 and start 0x30 are only
    // acknowledged): outer (C_RANGE+1) switches, C_RANGE inc and new_context,
    // return; inner per column init, (R_RANGE+1) switches, R_RANGE mul, inc
    // and add, return
    check(n_threads == (C_RANGE + 1) + 2 * C_RANGE + 1 + C_RANGE * (1 + (R_RANGE + 1) + 3 * R_RANGE + 1),
          $sformatf("%0d threads run", n_threads));
    check(max_sm >= 2, $sformatf("at most %0d SM instances live at once", max_sm));
    $display("threads %0d, invocations %0d, most SM instances live %0d", n_threads, n_ctx, max_sm);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("timeout: threads %0d, invocations %0d, returns %0d", n_threads, n_ctx, n_inner_ret);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
