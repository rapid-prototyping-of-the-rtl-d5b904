// tb_tsu_bus_if: self-checking test of the TSU bus interface. Issues bus
// writes and reads to every register of the map and checks the strobes and
// data handed to the TSU units, the read data returned, the one-cycle answer,
// that a held request is performed only once, that AqIndx writes wait while the
// AQ is full, that SM loads wait for the PPU, and that the Ready Queue pops
// only on RqIptr reads of a non-empty queue.
module tb_tsu_bus_if;
  import d2cmp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  bus_req_t req = '0;
  bus_rsp_t rsp;
  logic aq_wr_tnum, aq_wr_stat, aq_wr_indx, aq_full = 0, gm_we, cl_we, sm_load_valid;
  logic sm_load_ready = 0, rq_valid = 0, rq_pop, cyc_we, ev_bus_wait;
  logic [31:0] wdata, cyc_value = 32'h1234_5678, status_word = 32'h00AB_0C01,
               occupancy = 32'h0003_0025;
  logic [7:0] gm_wentry, cl_waddr;
  gm_field_e gm_wfield;
  ready_t sm_load_key;
  rc_t sm_load_count;
  fire_t rq_head = '{tnum: 16'h0131, index: 16'd4, ifp: 32'h0000_0100, dfp: 32'h0000_3A00};

  tsu_bus_if #(.GM_DEPTH(256), .CL_DEPTH(256)) dut (.*);

  // strobe counters
  int n_tnum = 0, n_stat = 0, n_indx = 0, n_gm = 0, n_cl = 0, n_cyc = 0, n_pop = 0, n_sm = 0;
  logic [31:0] last_wdata;
  logic [7:0] last_gm_entry, last_cl_addr;
  gm_field_e last_gm_field;
  always @(posedge clk) if (rst_n) begin
    if (aq_wr_tnum) n_tnum++;
    if (aq_wr_stat) n_stat++;
    if (aq_wr_indx) n_indx++;
    if (gm_we) begin n_gm++; last_gm_entry = gm_wentry; last_gm_field = gm_wfield; end
    if (cl_we) begin n_cl++; last_cl_addr = cl_waddr; end
    if (cyc_we) n_cyc++;
    if (rq_pop) n_pop++;
    if (sm_load_valid && sm_load_ready) n_sm++;
    last_wdata = wdata;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic access(input bit we, input logic [11:0] word, input logic [31:0] d,
                        output logic [31:0] rd, output int cycles);
    req = '{valid: 1'b1, we: we, addr: TSU_BASE | {18'd0, word, 2'b00}, wdata: d};
    cycles = 0;
    do begin @(posedge clk); #1; cycles++; end while (!rsp.ack);
    rd = rsp.rdata;
    @(posedge clk); #1;    // master sees ack; request still up this cycle
    req = '0;
  endtask

  task automatic wr(input logic [11:0] word, input logic [31:0] d, output int cycles);
    logic [31:0] rd;
    access(1'b1, word, d, rd, cycles);
  endtask

  task automatic rd(input logic [11:0] word, output logic [31:0] d);
    int c;
    access(1'b0, word, 32'h0, d, c);
    check(c == 1, "read answered in one cycle");
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c;
    logic [31:0] d;
    repeat (2) @(posedge clk); #1 rst_n = 1'b1;
    wr(R_AQ_TNUM, 32'h0031, c);
    check(n_tnum == 1 && c == 1 && last_wdata == 32'h0031, "AqTNum write once, one cycle");
    wr(R_AQ_STAT, 32'd1, c);
    check(n_stat == 1, "AqStat write");
    wr(R_AQ_INDX, 32'd3, c);
    check(n_indx == 1 && c == 1, "AqIndx write pushes once");
    // AQ full: the access waits
    aq_full = 1;
    fork
      wr(R_AQ_INDX, 32'd4, c);
      begin repeat (5) @(posedge clk); #1 aq_full = 0; end
    join
    check(n_indx == 2 && c == 6, $sformatf("AqIndx waits while AQ full (%0d cycles)", c));
    // GM template write: entry 0x35, field DFP
    wr(12'(R_GM_BASE + 4 * 8'h35 + 1), 32'h3A00, c);
    check(n_gm == 1 && last_gm_entry == 8'h35 && last_gm_field == GM_DFP, "GM field decode");
    wr(12'(R_GM_BASE + 4 * 255 + 3), 32'd2, c);
    check(n_gm == 2 && last_gm_entry == 8'hFF && last_gm_field == GM_RC, "GM last entry decode");
    wr(12'(R_CL_BASE + 17), 32'h0040, c);
    check(n_cl == 1 && last_cl_addr == 8'd17, "consumer list decode");
    wr(R_CYC_CTRL, 32'd1, c);
    check(n_cyc == 1, "counter control");
    // SM load waits for the PPU
    wr(R_SM_KEY, 32'h0034_0002, c);
    check(sm_load_key == '{tnum: 16'h0034, index: 16'd2}, "SM key register");
    fork
      wr(R_SM_LOAD, 32'd3, c);
      begin
        repeat (3) @(posedge clk); #1;
        check(sm_load_valid && sm_load_count == 4'd3 && ev_bus_wait, "SM load presented and waiting");
        sm_load_ready = 1; @(posedge clk); #1 sm_load_ready = 0;
      end
    join
    check(n_sm == 1 && c == 4, $sformatf("SM load done once after wait (%0d cycles)", c));
    // reads
    rd(R_STATUS, d);  check(d == status_word, "status read");
    rd(R_CYC_VAL, d); check(d == cyc_value, "counter read");
    rd(R_OCCUPANCY, d); check(d == occupancy, "occupancy read");
    rd(R_RQ_IPTR, d); check(d == 0 && n_pop == 0, "empty RQ reads 0 and does not pop");
    rq_valid = 1;
    rd(R_RQ_TNUM, d); check(d == 32'h0131, "RqTNum");
    rd(R_RQ_INDX, d); check(d == 32'd4, "RqIndx");
    rd(R_RQ_DPTR, d); check(d == 32'h3A00 && n_pop == 0, "RqDptr does not pop");
    rd(R_RQ_IPTR, d); check(d == 32'h0100 && n_pop == 1, "RqIptr reads IFP and pops once");
    check(n_tnum == 1 && n_stat == 1 && n_indx == 2 && n_gm == 2 && n_cl == 1, "no stray strobes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
