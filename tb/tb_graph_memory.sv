// tb_graph_memory: self-checking test of the Graph Memory. Loads random
// templates into every entry field by field, then reads them back through both
// ports, checking the one-cycle read latency and that each port returns its own
// fields; also checks read-during-write returns the old contents.
module tb_graph_memory;
  import d2cmp_pkg::*;
  localparam int unsigned DEPTH = 256;
  localparam int unsigned AW = $clog2(DEPTH);

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic wr_en = 0;
  logic [AW-1:0] wr_entry = '0, a_entry = '0, b_entry = '0;
  gm_field_e wr_field = GM_IFP;
  logic [31:0] wr_data = '0;
  tnum_t a_cons1, a_cons2;
  rc_t a_rc;
  ptr_t b_ifp, b_dfp;

  ptr_t  m_ifp [DEPTH], m_dfp [DEPTH];
  tnum_t m_c1 [DEPTH], m_c2 [DEPTH];
  rc_t   m_rc [DEPTH];

  graph_memory #(.DEPTH(DEPTH)) dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic write(input int e, input gm_field_e f, input logic [31:0] d);
    wr_en = 1; wr_entry = AW'(e); wr_field = f; wr_data = d;
    @(posedge clk); #1 wr_en = 0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk); #1;
    for (int e = 0; e < DEPTH; e++) begin
      m_ifp[e] = $urandom; m_dfp[e] = $urandom;
      m_c1[e] = tnum_t'($urandom); m_c2[e] = tnum_t'($urandom); m_rc[e] = rc_t'($urandom);
      write(e, GM_IFP, m_ifp[e]);
      write(e, GM_DFP, m_dfp[e]);
      write(e, GM_CONS, {m_c1[e], m_c2[e]});
      write(e, GM_RC, 32'(m_rc[e]) | 32'hFFFF_FFF0);
    end
    for (int k = 0; k < 600; k++) begin
      int ea, eb;
      ea = $urandom % DEPTH; eb = $urandom % DEPTH;
      a_entry = AW'(ea); b_entry = AW'(eb);
      @(posedge clk); #1;
      a_entry = AW'(ea + 1); b_entry = AW'(eb + 1);   // next address must not matter yet
      check(a_cons1 == m_c1[ea] && a_cons2 == m_c2[ea] && a_rc == m_rc[ea],
            $sformatf("port A entry %0d", ea));
      check(b_ifp == m_ifp[eb] && b_dfp == m_dfp[eb], $sformatf("port B entry %0d", eb));
    end
    // read during write returns the old value
    a_entry = 8'd5; b_entry = 8'd5;
    wr_en = 1; wr_entry = 8'd5; wr_field = GM_IFP; wr_data = ~m_ifp[5];
    @(posedge clk); #1 wr_en = 0;
    check(b_ifp == m_ifp[5], "read during write gives old contents");
    @(posedge clk); #1;
    check(b_ifp == ~m_ifp[5], "new contents one cycle later");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
