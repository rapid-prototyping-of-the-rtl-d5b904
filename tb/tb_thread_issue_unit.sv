// tb_thread_issue_unit: self-checking test of the Thread Issue Unit with a
// Graph Memory attached. Ready thread instances are pushed into the Waiting
// Queue; every Ready Queue entry must carry the thread's IFP and DFP from the
// GM, in order. Random stalls on both sides fill both queues; a streaming phase
// checks the one-thread-per-cycle rate and the WQ-to-RQ latency.
module tb_thread_issue_unit;
  import d2cmp_pkg::*;
  localparam int unsigned GM_DEPTH = 256, WQ_DEPTH = 16, FQ_DEPTH = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic wq_valid = 0, wq_ready, rq_valid, rq_pop = 0, idle, ev_issue;
  ready_t wq_data = '0;
  logic [7:0] gm_entry;
  ptr_t gm_ifp, gm_dfp;
  fire_t rq_head;
  logic [$clog2(WQ_DEPTH+1)-1:0] wq_count;
  logic [$clog2(FQ_DEPTH+1)-1:0] fq_count;

  logic gm_we = 0;
  logic [7:0] gm_wentry = '0;
  gm_field_e gm_wfield = GM_IFP;
  logic [31:0] gm_wdata = '0;
  tnum_t u_c1, u_c2;
  rc_t u_rc;

  thread_issue_unit #(.GM_DEPTH(GM_DEPTH), .WQ_DEPTH(WQ_DEPTH), .FQ_DEPTH(FQ_DEPTH)) dut (.*);

  graph_memory #(.DEPTH(GM_DEPTH)) u_gm (
    .clk, .wr_en(gm_we), .wr_entry(gm_wentry), .wr_field(gm_wfield), .wr_data(gm_wdata),
    .a_entry(8'd0), .a_cons1(u_c1), .a_cons2(u_c2), .a_rc(u_rc),
    .b_entry(gm_entry), .b_ifp(gm_ifp), .b_dfp(gm_dfp));

  ptr_t m_ifp [GM_DEPTH], m_dfp [GM_DEPTH];
  fire_t exp_q [$];
  int n_out = 0, max_wq = 0, max_fq = 0;
  bit random_pop = 1;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic gm_write(input int e, input gm_field_e f, input logic [31:0] d);
    gm_we = 1; gm_wentry = 8'(e); gm_wfield = f; gm_wdata = d;
    @(posedge clk); #1 gm_we = 0;
  endtask

  // Ready Queue reader
  always @(negedge clk) rq_pop <= random_pop ? (($urandom % 3) == 0) : 1'b1;
  always @(posedge clk) if (rst_n) begin
    if (int'(wq_count) > max_wq) max_wq = int'(wq_count);
    if (int'(fq_count) > max_fq) max_fq = int'(fq_count);
    if (rq_valid && rq_pop) begin
      fire_t e;
      n_out++;
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("FAIL: unexpected RQ entry"); end
      else begin
        e = exp_q.pop_front();
        if (rq_head != e) begin failures++; $display("FAIL: RQ %h exp %h", rq_head, e); end
      end
    end
  end

  task automatic push(input tnum_t t, input index_t i);
    wq_valid = 1; wq_data = '{tnum: t, index: i};
    #1;
    while (!wq_ready) begin @(posedge clk); #1; end
    @(posedge clk); #1 wq_valid = 0;
    exp_q.push_back('{tnum: t, index: i, ifp: m_ifp[t[7:0]], dfp: m_dfp[t[7:0]]});
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, lat;
    repeat (3) @(posedge clk); #1 rst_n = 1'b1;
    for (int e = 0; e < GM_DEPTH; e++) begin
      m_ifp[e] = 32'h0001_0000 + 32'(e) * 16; m_dfp[e] = $urandom;
      gm_write(e, GM_IFP, m_ifp[e]);
      gm_write(e, GM_DFP, m_dfp[e]);
    end
    check(idle && !rq_valid, "idle and empty after reset");
    // latency of one thread, reader stopped
    random_pop = 0;
    @(negedge clk); #1;
    wq_valid = 1; wq_data = '{tnum: 16'h0133, index: 16'd9};
    @(posedge clk); #1 wq_valid = 0;
    exp_q.push_back('{tnum: 16'h0133, index: 16'd9, ifp: m_ifp[8'h33], dfp: m_dfp[8'h33]});
    lat = 1;
    while (!rq_valid) begin @(posedge clk); #1; lat++; end
    check(lat == 3, $sformatf("WQ push to RQ valid: %0d cycles", lat));
    repeat (3) @(posedge clk); #1;
    // random traffic with a slow reader: both queues fill up
    random_pop = 1;
    for (int k = 0; k < 400; k++) push(tnum_t'($urandom), index_t'($urandom));
    repeat (200) @(posedge clk); #1;
    check(exp_q.size() == 0, "all threads issued");
    check(max_wq == WQ_DEPTH && max_fq == FQ_DEPTH, $sformatf("queues filled: WQ %0d FQ %0d", max_wq, max_fq));
    // streaming: 64 threads with a reader that never stalls
    random_pop = 0;
    @(negedge clk); #1;
    t0 = n_out;
    for (int k = 0; k < 64; k++) begin
      wq_valid = 1; wq_data = '{tnum: tnum_t'(k), index: index_t'(k)};
      exp_q.push_back('{tnum: tnum_t'(k), index: index_t'(k), ifp: m_ifp[k], dfp: m_dfp[k]});
      @(posedge clk); #1;
    end
    wq_valid = 0;
    repeat (4) @(posedge clk); #1;
    check(n_out - t0 == 64 && exp_q.size() == 0, $sformatf("64 threads in 68 cycles: %0d", n_out - t0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
