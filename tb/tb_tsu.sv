// tb_tsu: self-checking test of a whole Thread Synchronization Unit through
// its bus port only, as a processor uses it.
// Loads the six-thread template table of the running example (Thread# 0x0031
// to 0x0036, their IFP/DFP/consumers, Ready Counts 1,1,2,2,2,1) plus a
// trigger thread, a consumer list and an SM preload; then acknowledges random
// threads and instances. A reference model predicts every Ready Queue entry
// {Thread#, Index, IFP, DFP}; the testbench reads them back through
// RqTNum/RqIndx/RqDptr/RqIptr and compares. Also checks the latency from an
// AqIndx write to a ready thread, the status word and the cycle counter.
module tb_tsu;
  import d2cmp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  bus_req_t req = '0;
  bus_rsp_t rsp;
  tsu_ev_t  ev;

  tsu dut (.clk, .rst_n, .req, .rsp, .ev);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic bus(input bit we, input logic [11:0] word, input logic [31:0] d,
                     output logic [31:0] rd);
    req = '{valid: 1'b1, we: we, addr: TSU_BASE | {18'd0, word, 2'b00}, wdata: d};
    do @(posedge clk); while (!rsp.ack);
    rd = rsp.rdata;
    #1 req = '0;
    @(posedge clk); #1;
  endtask

  task automatic wr(input logic [11:0] word, input logic [31:0] d);
    logic [31:0] rd;
    bus(1'b1, word, d, rd);
  endtask

  task automatic rd(input logic [11:0] word, output logic [31:0] d);
    bus(1'b0, word, 32'h0, d);
  endtask

  // reference model
  ptr_t  m_ifp [256], m_dfp [256];
  tnum_t m_c1 [256], m_c2 [256], m_cl [256];
  rc_t   m_rc [256];
  rc_t   m_sm [ready_t];
  fire_t exp_q [$];
  int n_ev [8];

  always @(posedge clk) if (rst_n) begin
    if (ev.ack) n_ev[0]++;
    if (ev.list) n_ev[1]++;
    if (ev.sm_hit) n_ev[2]++;
    if (ev.sm_alloc) n_ev[3]++;
    if (ev.fire) n_ev[4]++;
    if (ev.issue) n_ev[6]++;
  end

  task automatic gm_load(input int e, input ptr_t ifp, input ptr_t dfp, input tnum_t c1,
                         input tnum_t c2, input rc_t rc);
    m_ifp[e] = ifp; m_dfp[e] = dfp; m_c1[e] = c1; m_c2[e] = c2; m_rc[e] = rc;
    wr(12'(R_GM_BASE + 4 * e + 0), ifp);
    wr(12'(R_GM_BASE + 4 * e + 1), dfp);
    wr(12'(R_GM_BASE + 4 * e + 2), {c1, c2});
    wr(12'(R_GM_BASE + 4 * e + 3), 32'(rc));
  endtask

  function automatic void model_ack(input tnum_t t, input status_e s, input index_t idx);
    tnum_t cons [$];
    int e;
    e = int'(t[7:0]);
    if (m_c1[e] == 0 && m_c2[e] != 0) begin
      for (int p = int'(m_c2[e][7:0]); m_cl[p] != 0; p = (p + 1) % 256) cons.push_back(m_cl[p]);
    end else begin
      if (m_c1[e] != 0 && (s == ST_ALL || s == ST_CONS1)) cons.push_back(m_c1[e]);
      if (m_c2[e] != 0 && (s == ST_ALL || s == ST_CONS2)) cons.push_back(m_c2[e]);
    end
    foreach (cons[i]) if (cons[i][15:8] == 8'h00) cons[i] = {t[15:8], cons[i][7:0]};
    foreach (cons[i]) begin
      ready_t k;
      rc_t c;
      int ce;
      k = '{tnum: cons[i], index: idx};
      ce = int'(cons[i][7:0]);
      c = m_sm.exists(k) ? m_sm[k] : m_rc[ce];
      c = (c == 0) ? 0 : c - 1;
      if (c == 0) begin
        exp_q.push_back('{tnum: cons[i], index: idx, ifp: m_ifp[ce], dfp: m_dfp[ce]});
        if (m_sm.exists(k)) m_sm.delete(k);
      end else m_sm[k] = c;
    end
  endfunction

  task automatic ack(input tnum_t t, input status_e s, input index_t idx);
    wr(R_AQ_TNUM, 32'(t));
    wr(R_AQ_STAT, 32'(s));
    wr(R_AQ_INDX, 32'(idx));
    model_ack(t, s, idx);
  endtask

  // drain the Ready Queue, comparing each entry with the model
  task automatic drain();
    logic [31:0] st, tn, ix, dp, ip;
    int guard;
    guard = 0;
    forever begin
      rd(R_STATUS, st);
      if (!st[0]) begin
        if (st[4] || guard > 50) break;
        guard++;
        continue;
      end
      rd(R_RQ_TNUM, tn); rd(R_RQ_INDX, ix); rd(R_RQ_DPTR, dp); rd(R_RQ_IPTR, ip);
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("FAIL: unexpected thread %h", tn); end
      else begin
        fire_t e;
        e = exp_q.pop_front();
        if (tn[15:0] != e.tnum || ix[15:0] != e.index || dp != e.dfp || ip != e.ifp) begin
          failures++;
          $display("FAIL: RQ %h/%h/%h/%h exp %h", tn, ix, ip, dp, e);
        end
      end
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d, c0, c1;
    int lat;
    repeat (3) @(posedge clk); #1 rst_n = 1'b1;
    rd(R_STATUS, d);
    check(d[0] == 0 && d[2] == 1 && d[4] == 1, "status after reset: RQ empty, AQ empty, idle");
    for (int i = 0; i < 256; i++) begin m_c1[i] = '0; m_c2[i] = '0; m_rc[i] = '0; m_cl[i] = '0; end
    // templates of the example (IFP, DFP, Cons1, Cons2, Ready Count)
    gm_load(8'h31, 32'h0100, 32'h3A00, 16'h0034, 16'h0035, 4'd1);
    gm_load(8'h32, 32'h0108, 32'h3A00, 16'h0036, 16'h0000, 4'd1);
    gm_load(8'h33, 32'h011C, 32'h3A00, 16'h0034, 16'h0000, 4'd2);
    gm_load(8'h34, 32'h0112, 32'h3A00, 16'h0035, 16'h0000, 4'd2);
    gm_load(8'h35, 32'h0122, 32'h3A00, 16'h0032, 16'h0000, 4'd2);
    gm_load(8'h36, 32'h0126, 32'h3A00, 16'h0000, 16'h0000, 4'd1);
    // trigger thread 0x0030 with a consumer list {0x0031, 0x0033, 0x0036}
    m_cl[8] = 16'h0031; m_cl[9] = 16'h0033; m_cl[10] = 16'h0036; m_cl[11] = 16'h0000;
    for (int i = 8; i < 12; i++) wr(12'(R_CL_BASE + i), 32'(m_cl[i]));
    gm_load(8'h30, 32'h00F0, 32'h0000, 16'h0000, 16'h0008, 4'd1);
    // SM preload: instance (0x0033, 0) needs 3 updates instead of 2
    wr(R_SM_KEY, {16'h0033, 16'd0});
    wr(R_SM_LOAD, 32'd3);
    m_sm[ready_t'({16'h0033, 16'd0})] = 4'd3;
    rd(R_OCCUPANCY, d);
    check(d == 32'h0000_0001, $sformatf("occupancy after SM preload: %h", d));

    // latency: ack 0x0032 (consumer 0x0036, count 1) -> ready
    wr(R_CYC_CTRL, 32'd3);
    wr(R_AQ_TNUM, 32'h0032);
    wr(R_AQ_STAT, 32'd0);
    req = '{valid: 1'b1, we: 1'b1, addr: TSU_BASE | (32'(R_AQ_INDX) << 2), wdata: 32'd7};
    lat = 0;
    do begin
      @(posedge clk); lat++;
      if (rsp.ack) begin #1 req = '0; end else #1;
    end while (!dut.rq_valid);
    model_ack(16'h0032, ST_ALL, 16'd7);
    check(lat == 7, $sformatf("AqIndx write to Ready Queue valid: %0d cycles", lat));
    @(posedge clk); #1;
    drain();
    rd(R_CYC_VAL, c0);
    rd(R_CYC_VAL, c1);
    check(c1 - c0 == 3, $sformatf("cycle counter advances 3 per read: %0d", c1 - c0));

    // trigger, then random acknowledgements of the example threads
    ack(16'h0030, ST_ALL, 16'd0);
    drain();
    for (int k = 0; k < 300; k++) begin
      ack({8'($urandom % 2), 8'(8'h31 + $urandom % 6)}, status_e'($urandom % 3), index_t'($urandom % 3));
      if (k % 5 == 4) drain();
    end
    drain();
    check(exp_q.size() == 0, $sformatf("%0d ready threads missing", exp_q.size()));
    rd(R_RQ_IPTR, d);
    check(d == 0, "empty Ready Queue reads IFP 0");
    check(n_ev[0] == 302 && n_ev[1] == 3 && n_ev[2] > 0 && n_ev[3] > 0 && n_ev[4] == n_ev[6],
          $sformatf("events ack=%0d list=%0d hit=%0d alloc=%0d fire=%0d issue=%0d",
                    n_ev[0], n_ev[1], n_ev[2], n_ev[3], n_ev[4], n_ev[6]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
