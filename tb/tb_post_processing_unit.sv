// tb_post_processing_unit: self-checking test of the Post Processing Unit,
// with a Graph Memory attached.
// Loads random templates (direct consumers, switch consumers, consumer lists)
// and a few SM preloads, then sends random acknowledgements. A reference model
// of the ready-count bookkeeping predicts the exact sequence of thread
// instances sent to the Waiting Queue (with Context inheritance), which is compared entry by entry while
// the Waiting Queue side stalls at random. Also checks the latency of a single
// acknowledgement, that every mechanism occurred, and the SM-full stall.
module tb_post_processing_unit;
  import d2cmp_pkg::*;
  localparam int unsigned GM_DEPTH = 256, SM_ENTRIES = 64, AQ_DEPTH = 16, CL_DEPTH = 256;
  localparam int unsigned NPROD = 48;        // producer threads 0x01..0x30
  localparam int unsigned NCONS = 8;         // consumer threads 0x40..0x47

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic aq_wr_tnum = 0, aq_wr_stat = 0, aq_wr_indx = 0, aq_full, aq_empty;
  logic [31:0] wdata = '0;
  logic cl_we = 0;
  logic [7:0] cl_waddr = '0;
  logic sm_load_valid = 0, sm_load_ready;
  ready_t sm_load_key = '0;
  rc_t sm_load_count = '0;
  logic [7:0] gm_entry;
  tnum_t gm_cons1, gm_cons2;
  rc_t gm_rc;
  logic wq_valid, wq_ready = 0;
  ready_t wq_data;
  logic [$clog2(AQ_DEPTH+1)-1:0] aq_count;
  logic [$clog2(SM_ENTRIES+1)-1:0] sm_used;
  logic idle, sm_full, ev_ack, ev_list, ev_sm_hit, ev_sm_alloc, ev_fire, ev_stall;

  // GM write port driven by the testbench
  logic gm_we = 0;
  logic [7:0] gm_wentry = '0;
  gm_field_e gm_wfield = GM_IFP;
  logic [31:0] gm_wdata = '0;
  ptr_t unused_ifp, unused_dfp;

  post_processing_unit #(.GM_DEPTH(GM_DEPTH), .SM_ENTRIES(SM_ENTRIES),
                         .AQ_DEPTH(AQ_DEPTH), .CL_DEPTH(CL_DEPTH)) dut (.*);

  graph_memory #(.DEPTH(GM_DEPTH)) u_gm (
    .clk, .wr_en(gm_we), .wr_entry(gm_wentry), .wr_field(gm_wfield), .wr_data(gm_wdata),
    .a_entry(gm_entry), .a_cons1(gm_cons1), .a_cons2(gm_cons2), .a_rc(gm_rc),
    .b_entry(8'd0), .b_ifp(unused_ifp), .b_dfp(unused_dfp));

  // reference model
  tnum_t m_c1 [GM_DEPTH], m_c2 [GM_DEPTH];
  rc_t   m_rc [GM_DEPTH];
  tnum_t m_cl [CL_DEPTH];
  rc_t   m_sm [ready_t];
  ready_t exp_q [$];
  int n_ack = 0, n_list = 0, n_hit = 0, n_alloc = 0, n_fire = 0, n_stall = 0, n_got = 0;

  always @(posedge clk) if (rst_n) begin
    if (ev_ack) n_ack++;
    if (ev_list) n_list++;
    if (ev_sm_hit) n_hit++;
    if (ev_sm_alloc) n_alloc++;
    if (ev_fire) n_fire++;
    if (ev_stall) n_stall++;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic gm_write(input int e, input gm_field_e f, input logic [31:0] d);
    gm_we = 1; gm_wentry = 8'(e); gm_wfield = f; gm_wdata = d;
    @(posedge clk); #1 gm_we = 0;
  endtask

  function automatic void model_ack(input tnum_t t, input status_e s, input index_t idx);
    tnum_t cons [$];
    int e;
    e = int'(t[7:0]);
    if (m_c1[e] == 0 && m_c2[e] != 0) begin
      for (int p = int'(m_c2[e][7:0]); m_cl[p] != 0; p = (p + 1) % CL_DEPTH) cons.push_back(m_cl[p]);
    end else begin
      if (m_c1[e] != 0 && (s == ST_ALL || s == ST_CONS1)) cons.push_back(m_c1[e]);
      if (m_c2[e] != 0 && (s == ST_ALL || s == ST_CONS2)) cons.push_back(m_c2[e]);
    end
    foreach (cons[i]) if (cons[i][15:8] == 8'h00) cons[i] = {t[15:8], cons[i][7:0]};
    foreach (cons[i]) begin
      ready_t k;
      rc_t c;
      k = '{tnum: cons[i], index: idx};
      c = m_sm.exists(k) ? m_sm[k] : m_rc[cons[i][7:0]];
      c = (c == 0) ? 0 : c - 1;
      if (c == 0) begin
        exp_q.push_back(k);
        if (m_sm.exists(k)) m_sm.delete(k);
      end else m_sm[k] = c;
    end
  endfunction

  task automatic send_ack(input tnum_t t, input status_e s, input index_t idx);
    while (aq_full) begin @(posedge clk); #1; end
    wdata = 32'(t); aq_wr_tnum = 1; @(posedge clk); #1 aq_wr_tnum = 0;
    wdata = 32'(s); aq_wr_stat = 1; @(posedge clk); #1 aq_wr_stat = 0;
    while (aq_full) begin @(posedge clk); #1; end
    wdata = 32'(idx); aq_wr_indx = 1; @(posedge clk); #1 aq_wr_indx = 0;
    model_ack(t, s, idx);
  endtask

  task automatic sm_load(input ready_t k, input rc_t c);
    sm_load_valid = 1; sm_load_key = k; sm_load_count = c;
    #1;
    while (!sm_load_ready) begin @(posedge clk); #1; end
    @(posedge clk); #1 sm_load_valid = 0;
    if (c != 0) m_sm[k] = c; else if (m_sm.exists(k)) m_sm.delete(k);
  endtask

  // Waiting Queue side: random stalls, compare every entry
  bit wq_random = 1;
  always @(negedge clk) wq_ready <= wq_random ? (($urandom % 4) != 0) : 1'b1;
  always @(posedge clk) begin
    if (rst_n && wq_valid && wq_ready) begin
      n_got++;
      if (exp_q.size() == 0) begin
        checks++; failures++; $display("FAIL: unexpected ready thread %h", wq_data);
      end else begin
        ready_t e;
        e = exp_q.pop_front();
        checks++;
        if (wq_data != e) begin failures++; $display("FAIL: WQ got %h exp %h", wq_data, e); end
      end
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat;
    repeat (3) @(posedge clk); #1 rst_n = 1'b1;
    // consumer lists at 0x10.. and 0x20..
    for (int i = 0; i < CL_DEPTH; i++) m_cl[i] = '0;
    for (int i = 0; i < 5; i++) m_cl[16 + i] = tnum_t'(16'h0040 + i);
    for (int i = 0; i < 3; i++) m_cl[32 + i] = tnum_t'(16'h0045 + i);
    for (int i = 0; i < CL_DEPTH; i++) begin
      cl_we = 1; cl_waddr = 8'(i); wdata = 32'(m_cl[i]);
      @(posedge clk); #1;
    end
    cl_we = 0;
    // templates
    for (int e = 0; e < GM_DEPTH; e++) begin
      m_c1[e] = '0; m_c2[e] = '0; m_rc[e] = '0;
      if (e >= 1 && e <= NPROD) begin
        int kind;
        kind = $urandom % 4;
        if (kind == 0) begin m_c1[e] = '0; m_c2[e] = (e % 2) ? 16'd16 : 16'd32; end
        else if (kind == 1) m_c1[e] = tnum_t'(16'h0040 + $urandom % NCONS);
        else begin
          m_c1[e] = tnum_t'(16'h0040 + $urandom % NCONS);
          m_c2[e] = tnum_t'(((e % 5) == 0 ? 16'h0500 : 16'h0000) + 16'h0040 + $urandom % NCONS);
        end
      end
      if (e >= 'h40 && e < 'h40 + NCONS) m_rc[e] = rc_t'(1 + $urandom % 4);
      gm_write(e, GM_CONS, {m_c1[e], m_c2[e]});
      gm_write(e, GM_RC, 32'(m_rc[e]));
    end
    // latency: producer 0x31 -> consumer 0x48 with Ready Count 1
    m_c1[8'h31] = 16'h0048; m_rc[8'h48] = 4'd1;
    gm_write(8'h31, GM_CONS, {16'h0048, 16'h0000});
    gm_write(8'h48, GM_RC, 32'd1);
    wq_random = 0;
    @(negedge clk); #1;
    send_ack(16'h0031, ST_ALL, 16'd5);
    lat = 0;
    while (!wq_valid) begin @(posedge clk); #1; lat++; end
    check(lat == 3, $sformatf("ack to WQ latency %0d cycles after the AqIndx write", lat));
    @(posedge clk); #1;
    wq_random = 1;
    // SM preloads (also take the place of some GM counts)
    sm_load('{tnum: 16'h0041, index: 16'd0}, 4'd2);
    sm_load('{tnum: 16'h0042, index: 16'd1}, 4'd1);
    // random acknowledgements
    for (int k = 0; k < 600; k++) begin
      send_ack({8'($urandom % 2), 8'(1 + $urandom % NPROD)}, status_e'($urandom % 4), index_t'($urandom % 2));
      if (k % 100 == 50) sm_load('{tnum: tnum_t'(16'h0040 + $urandom % NCONS), index: index_t'($urandom % 4)}, rc_t'($urandom % 3));
    end
    repeat (200) @(posedge clk); #1;
    check(exp_q.size() == 0, $sformatf("%0d expected ready threads missing", exp_q.size()));
    check(idle, "PPU idle at the end");
    check(aq_count == 0 && int'(sm_used) == m_sm.size(),
          $sformatf("occupancy: AQ %0d, SM %0d in use, %0d expected", aq_count, sm_used, m_sm.size()));
    check(n_ack == 601, $sformatf("acknowledgements taken %0d", n_ack));
    check(n_list > 0 && n_hit > 0 && n_alloc > 0 && n_fire > 0 && n_stall > 0,
          $sformatf("mechanisms: list=%0d hit=%0d alloc=%0d fire=%0d stall=%0d",
                    n_list, n_hit, n_alloc, n_fire, n_stall));
    $display("ready threads %0d, list %0d, hit %0d, alloc %0d, stall cycles %0d",
             n_got, n_list, n_hit, n_alloc, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
