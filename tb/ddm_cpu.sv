// ddm_cpu: behavioural model of one D2-CMP processor running a DDM program,
// for testbenches only (not synthesizable).
//
// The model stands in for the node's processor. It talks to its own TSU and
// to the shared memory only through bus loads and stores, as real software
// would. It runs a list of matrix-multiplication jobs; job j computes
// NTHR[j] output elements, each as one thread doing NPTS[j] multiply-and-
// accumulate steps: A[i] = sum_k R[k] * Q[i][k], repeated for ITERS
// iterations of an outer loop controlled by a switch thread. Per job it:
//   1. writes R and Q to shared memory,
//   2. initialises the TSU: templates in the Graph Memory, the fork thread's
//      consumer list, an SM preload for the first join instance,
//   3. acknowledges a start thread and then loops: read the Ready Queue
//      (polling while empty), run the thread named by its IFP, acknowledge it.
//      An acknowledgement is written only when the status word shows room in
//      the AQ; otherwise it is kept and written before the next Ready Queue
//      read that finds room.
// Thread graph (Thread# : role):
//   0x0F start -> 0x10 fork (consumer list of all MAC threads)
//   0x80+i MAC threads (up to 128) -> 0x20+g join (Ready Count = group size)
//   joins -> 0x7E switch (Ready Count = number of groups)
// A join group holds 8 MAC threads, or more when needed to keep the number of
// groups within the 15 producers a 4-bit Ready Count allows.
// Memory layout per node (byte offsets from the node's data base): R at 0,
// row i of Q at 0x1000 + 256*i, output A[i] of iteration x at
// 0xC000 + 4*(256*x + i).
//   switch: status CONS1 -> fork, next index (next iteration); CONS2 -> 0x7F return.
// The cycle counter of the TSU times each job from the start of TSU
// initialisation to the return thread.
module ddm_cpu
  import d2cmp_pkg::*;
#(
  parameter int unsigned NODE  = 0,
  parameter int unsigned NJOBS = 2,
  parameter int unsigned ITERS = 2,
  parameter int unsigned NTHR [NJOBS] = '{1, 8},
  parameter int unsigned NPTS [NJOBS] = '{1, 16}
) (
  input  logic     clk,
  input  logic     rst_n,
  output bus_req_t req,
  input  bus_rsp_t rsp,
  output logic     done
);
  localparam logic [31:0] TB = TSU_BASE + 32'(NODE) * 32'h4000;
  localparam logic [31:0] DB = 32'h1000_0000 + 32'(NODE) * 32'h0001_0000;

  // statistics read by the testbench
  int n_threads = 0, n_polls = 0, n_deferred = 0, n_sw_loop = 0, n_sw_exit = 0, n_preload = 0;
  int job_cycles [NJOBS];
  int init_cycles [NJOBS];

  initial begin
    req  = '0;
    done = 1'b0;
  end

  task automatic bus(input bit we, input logic [31:0] addr, input logic [31:0] d,
                     output logic [31:0] rd);
    @(posedge clk);
    #1 req = '{valid: 1'b1, we: we, addr: addr, wdata: d};
    do @(posedge clk); while (!rsp.ack);
    rd = rsp.rdata;
    #1 req = '0;
  endtask

  task automatic st(input logic [31:0] addr, input logic [31:0] d);
    logic [31:0] rd;
    bus(1'b1, addr, d, rd);
  endtask

  task automatic ld(input logic [31:0] addr, output logic [31:0] d);
    bus(1'b0, addr, 32'h0, d);
  endtask

  task automatic tsu_wr(input logic [11:0] word, input logic [31:0] d);
    st(TB + (32'(word) << 2), d);
  endtask

  task automatic tsu_rd(input logic [11:0] word, output logic [31:0] d);
    ld(TB + (32'(word) << 2), d);
  endtask

  task automatic template(input int e, input logic [31:0] ifp, input logic [31:0] dfp,
                          input logic [15:0] c1, input logic [15:0] c2, input int rc);
    tsu_wr(12'(R_GM_BASE + 4 * e + 0), ifp);
    tsu_wr(12'(R_GM_BASE + 4 * e + 1), dfp);
    tsu_wr(12'(R_GM_BASE + 4 * e + 2), {c1, c2});
    tsu_wr(12'(R_GM_BASE + 4 * e + 3), 32'(rc));
  endtask

  // Acknowledgements are written only while the AQ has room: if the AQ is
  // full the PPU may be waiting for Waiting/Firing Queue room, which only this
  // processor can free by taking threads, so a blocking write could deadlock.
  // Such acknowledgements are kept and written later.
  ack_t pending [$];

  task automatic ack_now(input ack_t a);
    tsu_wr(R_AQ_TNUM, 32'(a.tnum));
    tsu_wr(R_AQ_STAT, 32'(a.status));
    tsu_wr(R_AQ_INDX, 32'(a.index));
  endtask

  task automatic flush_acks();
    logic [31:0] stw;
    while (pending.size() > 0) begin
      tsu_rd(R_STATUS, stw);
      if (stw[1]) break;                      // AQ full
      ack_now(pending.pop_front());
    end
  endtask

  task automatic ack(input logic [15:0] t, input status_e s, input logic [15:0] idx);
    pending.push_back('{tnum: t, status: s, index: idx});
    flush_acks();
    if (pending.size() > 0) n_deferred++;
  endtask

  // input data, the same formula as the testbench's reference
  function automatic logic [31:0] r_val(input int j, input int k);
    return 32'(NODE * 7 + j * 3 + k + 1);
  endfunction
  function automatic logic [31:0] q_val(input int j, input int i, input int k);
    return 32'((i * 3 + k * 5 + j + NODE) % 17);
  endfunction

  task automatic run_job(input int j);
    int nthr, npts, ngrp, gsz;
    logic [31:0] c0, c1, tn, ix, dp, ip, v, r, q, sum;
    bit fin;
    nthr = NTHR[j]; npts = NPTS[j];
    gsz  = (nthr + 14) / 15;
    if (gsz < 8) gsz = 8;
    ngrp = (nthr + gsz - 1) / gsz;
    // data
    for (int k = 0; k < npts; k++) st(DB + 32'(k) * 4, r_val(j, k));
    for (int i = 0; i < nthr; i++)
      for (int k = 0; k < npts; k++) st(DB + 32'h1000 + 32'(i * 64 + k) * 4, q_val(j, i, k));
    // TSU initialisation, timed by the TSU's cycle counter
    tsu_wr(R_CYC_CTRL, 32'd3);
    tsu_rd(R_CYC_VAL, c0);
    template(8'h0F, 32'h0, 32'h0, 16'h0010, 16'h0000, 0);
    template(8'h10, 32'h1100, 32'h0, 16'h0000, 16'h0010, 1);
    for (int i = 0; i < nthr; i++) begin
      template(8'h80 + i, 32'h2000 + 32'(i) * 16, DB + 32'h1000 + 32'(i) * 256,
               16'h0020 + 16'(i / gsz), 16'h0000, 1);
      tsu_wr(12'(R_CL_BASE + 16 + i), 32'h0080 + 32'(i));
    end
    tsu_wr(12'(R_CL_BASE + 16 + nthr), 32'h0);
    for (int g = 0; g < ngrp; g++)
      template(8'h20 + g, 32'h7000, 32'h0, 16'h007E, 16'h0000,
               (g == ngrp - 1 && nthr % gsz != 0) ? nthr % gsz : gsz);
    template(8'h7E, 32'h7E00, 32'h0, 16'h0010, 16'h007F, ngrp);
    template(8'h7F, 32'h7F00, 32'h0, 16'h0000, 16'h0000, 1);
    // preload the first join instance (same count the template holds)
    tsu_wr(R_SM_KEY, {16'h0020, 16'd0});
    tsu_wr(R_SM_LOAD, (nthr >= gsz) ? 32'(gsz) : 32'(nthr));
    n_preload++;
    tsu_rd(R_CYC_VAL, c1);
    init_cycles[j] = int'(c1 - c0);
    // run
    ack(16'h000F, ST_ALL, 16'd0);
    fin = 0;
    while (!fin) begin
      flush_acks();
      tsu_rd(R_RQ_TNUM, tn);
      if (tn == 0) begin n_polls++; continue; end
      tsu_rd(R_RQ_INDX, ix);
      tsu_rd(R_RQ_DPTR, dp);
      tsu_rd(R_RQ_IPTR, ip);
      n_threads++;
      if (ip >= 32'h2000 && ip < 32'h7000) begin
        // MAC thread: inner product of R with one row of Q
        int i;
        i = int'((ip - 32'h2000) / 16);
        sum = 0;
        for (int k = 0; k < npts; k++) begin
          ld(DB + 32'(k) * 4, r);
          ld(dp + 32'(k) * 4, q);
          sum += r * q;
        end
        st(DB + 32'hC000 + 32'(ix * 256 + 32'(i)) * 4, sum);
        ack(tn[15:0], ST_ALL, ix[15:0]);
      end else if (ip == 32'h7E00) begin
        // switch thread: loop again or leave
        if (ix + 1 < ITERS) begin n_sw_loop++; ack(tn[15:0], ST_CONS1, ix[15:0] + 16'd1); end
        else begin n_sw_exit++; ack(tn[15:0], ST_CONS2, ix[15:0]); end
      end else if (ip == 32'h7F00) begin
        fin = 1;                                  // return thread
      end else begin
        ack(tn[15:0], ST_ALL, ix[15:0]);          // fork and join threads
      end
    end
    tsu_rd(R_CYC_VAL, c1);
    job_cycles[j] = int'(c1 - c0);
    tsu_wr(R_CYC_CTRL, 32'd0);
  endtask

  initial begin
    @(posedge rst_n);
    repeat (2) @(posedge clk);
    for (int j = 0; j < NJOBS; j++) run_job(j);
    done = 1'b1;
  end
endmodule
