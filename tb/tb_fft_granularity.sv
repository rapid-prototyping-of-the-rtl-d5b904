// tb_fft_granularity: thread-granularity sweep of a 256-point radix-2 FFT run
// as a data-driven program on node 0 of the default-size D2-CMP.
//
// The FFT has 8 stages of 128 butterflies. A thread performs G consecutive
// butterflies of one stage (G = 1, 2, 4, 8, 16, so 128/G threads per stage).
// Program graph per job, with the stage number carried in the Index:
//   0x0F start -> 0x10 fork (consumer list of all butterfly threads)
//   0x80+t butterfly threads -> 0x20+g joins (Ready Count = group size, 8 or
//   more so that there are at most 15 groups) -> 0x7E switch (Ready Count =
//   number of groups): CONS1 -> fork at the next stage, CONS2 -> 0x7F return.
// A stage therefore starts only after every butterfly of the previous one
// has finished; the testbench's processor does the arithmetic with bus loads
// and stores on complex data in shared memory (real and imaginary parts as
// 32-bit integers, twiddle factors in Q14 fixed point) and acknowledges each
// thread, holding acknowledgements back while the AQ is full.
// Every output is compared with the same integer FFT computed directly in the
// testbench, so a thread run out of order changes the result. The cycles per
// job, measured by the TSU cycle counter, are printed.
module tb_fft_granularity;
  import d2cmp_pkg::*;
  localparam int unsigned NODES = 2, N = 256, STAGES = 8, NJOBS = 5;
  localparam int unsigned GRAN [NJOBS] = '{1, 2, 4, 8, 16};
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

  int n_stall = 0;
  always @(posedge clk) if (rst_n) n_stall += int'(ev[0].stall);

  // ---- arithmetic shared by the processor model and the reference ----
  int wr [N/2], wi [N/2];                 // twiddles exp(-2*pi*j*k/N), Q14
  initial
    for (int k = 0; k < N / 2; k++) begin
      wr[k] = int'($rtoi($floor(16384.0 * $cos(2.0 * 3.14159265358979 * k / N) + 0.5)));
      wi[k] = int'($rtoi($floor(-16384.0 * $sin(2.0 * 3.14159265358979 * k / N) + 0.5)));
    end

  function automatic int bitrev(input int i);
    int r;
    r = 0;
    for (int b = 0; b < STAGES; b++) if (i & (1 << b)) r |= 1 << (STAGES - 1 - b);
    return r;
  endfunction

  // butterfly b of stage s: positions and twiddle index
  function automatic void bfly_pos(input int s, input int b, output int i0, output int i1, output int k);
    int h;
    h  = 1 << s;
    i0 = (b / h) * 2 * h + (b % h);
    i1 = i0 + h;
    k  = (b % h) * (N / (2 * h));
  endfunction

  function automatic void bfly(input int k, inout int ar, inout int ai, inout int br, inout int bi);
    longint tr, ti;
    tr = (longint'(wr[k]) * br - longint'(wi[k]) * bi) >>> 14;
    ti = (longint'(wr[k]) * bi + longint'(wi[k]) * br) >>> 14;
    br = ar - int'(tr); bi = ai - int'(ti);
    ar = ar + int'(tr); ai = ai + int'(ti);
  endfunction

  function automatic int in_re(input int j, input int i); return (i * 7 + j * 3) % 41 - 20; endfunction
  function automatic int in_im(input int j, input int i); return (i * 11 + j) % 23 - 11; endfunction

  // ---- processor 0 ----
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

  ack_t pending [$];
  int n_deferred = 0, n_threads = 0;
  task automatic flush_acks();
    logic [31:0] stw;
    while (pending.size() > 0) begin
      tsu_rd(R_STATUS, stw);
      if (stw[1]) break;
      begin
        ack_t a;
        a = pending.pop_front();
        tsu_wr(R_AQ_TNUM, 32'(a.tnum));
        tsu_wr(R_AQ_STAT, 32'(a.status));
        tsu_wr(R_AQ_INDX, 32'(a.index));
      end
    end
  endtask
  task automatic ack(input logic [15:0] t, input status_e s, input logic [15:0] ix);
    pending.push_back('{tnum: t, status: s, index: ix});
    flush_acks();
    if (pending.size() > 0) n_deferred++;
  endtask

  int job_cycles [NJOBS];

  task automatic run_job(input int j);
    int g, nthr, gsz, ngrp;
    logic [31:0] tn, ix, ip, dp, c0, c1, v;
    bit fin;
    g = GRAN[j]; nthr = (N / 2) / g;
    gsz = (nthr + 14) / 15; if (gsz < 8) gsz = 8;
    ngrp = (nthr + gsz - 1) / gsz;
    for (int i = 0; i < N; i++) begin       // input in bit-reversed order
      st(DB + 32'(i) * 8,     32'(in_re(j, bitrev(i))));
      st(DB + 32'(i) * 8 + 4, 32'(in_im(j, bitrev(i))));
    end
    tsu_wr(R_CYC_CTRL, 32'd3);
    tsu_rd(R_CYC_VAL, c0);
    template(8'h0F, 32'h0, 16'h0010, 16'h0000, 0);
    template(8'h10, 32'h1000, 16'h0000, 16'h0010, 1);
    for (int t = 0; t < nthr; t++) begin
      template(8'h80 + 8'(t), 32'h2000 + 32'(t) * 16, 16'h0020 + 16'(t / gsz), 16'h0000, 1);
      tsu_wr(12'(R_CL_BASE + 16 + t), 32'h0080 + 32'(t));
    end
    tsu_wr(12'(R_CL_BASE + 16 + nthr), 32'h0);
    for (int q = 0; q < ngrp; q++)
      template(8'h20 + 8'(q), 32'h7000, 16'h007E, 16'h0000,
               (q == ngrp - 1 && nthr % gsz != 0) ? nthr % gsz : gsz);
    template(8'h7E, 32'h7E00, 16'h0010, 16'h007F, ngrp);
    template(8'h7F, 32'h7F00, 16'h0000, 16'h0000, 1);
    ack(16'h000F, ST_ALL, 16'd0);
    fin = 0;
    while (!fin) begin
      flush_acks();
      tsu_rd(R_RQ_TNUM, tn);
      if (tn == 0) continue;
      tsu_rd(R_RQ_INDX, ix);
      tsu_rd(R_RQ_DPTR, dp);
      tsu_rd(R_RQ_IPTR, ip);
      n_threads++;
      if (ip >= 32'h2000 && ip < 32'h7000) begin
        int t;
        t = int'((ip - 32'h2000) / 16);
        for (int b = t * g; b < (t + 1) * g; b++) begin
          int i0, i1, k, ar, ai, br, bi;
          bfly_pos(int'(ix), b, i0, i1, k);
          ld(dp + 32'(i0) * 8, v); ar = int'(v);
          ld(dp + 32'(i0) * 8 + 4, v); ai = int'(v);
          ld(dp + 32'(i1) * 8, v); br = int'(v);
          ld(dp + 32'(i1) * 8 + 4, v); bi = int'(v);
          bfly(k, ar, ai, br, bi);
          st(dp + 32'(i0) * 8, 32'(ar)); st(dp + 32'(i0) * 8 + 4, 32'(ai));
          st(dp + 32'(i1) * 8, 32'(br)); st(dp + 32'(i1) * 8 + 4, 32'(bi));
        end
        ack(tn[15:0], ST_ALL, ix[15:0]);
      end else if (ip == 32'h7E00) begin
        if (ix + 1 < STAGES) ack(tn[15:0], ST_CONS1, ix[15:0] + 16'd1);
        else ack(tn[15:0], ST_CONS2, ix[15:0]);
      end else if (ip == 32'h7F00) fin = 1;
      else ack(tn[15:0], ST_ALL, ix[15:0]);
    end
    tsu_rd(R_CYC_VAL, c1);
    job_cycles[j] = int'(c1 - c0);
  endtask

  task automatic check_job(input int j);
    int xr [N], xi [N];
    for (int i = 0; i < N; i++) begin xr[i] = in_re(j, bitrev(i)); xi[i] = in_im(j, bitrev(i)); end
    for (int s = 0; s < STAGES; s++)
      for (int b = 0; b < N / 2; b++) begin
        int i0, i1, k;
        bfly_pos(s, b, i0, i1, k);
        bfly(k, xr[i0], xi[i0], xr[i1], xi[i1]);
      end
    for (int i = 0; i < N; i++)
      check(mem[DB + 32'(i) * 8] == 32'(xr[i]) && mem[DB + 32'(i) * 8 + 4] == 32'(xi[i]),
            $sformatf("granularity %0d X[%0d]", GRAN[j], i));
  endtask

  initial begin
    cpu_req[0] = '0; cpu_req[1] = '0;
    repeat (3) @(posedge clk); #1 rst_n = 1'b1;
    repeat (2) @(posedge clk);
    for (int j = 0; j < NJOBS; j++) begin
      run_job(j);
      repeat (2) @(posedge clk);
      check_job(j);
    end
    begin
      int e;
      e = 0;                                // per stage: fork, threads, joins, switch
      for (int j = 0; j < NJOBS; j++) begin
        int nthr, gsz;
        nthr = (N / 2) / GRAN[j];
        gsz = (nthr + 14) / 15; if (gsz < 8) gsz = 8;
        e += STAGES * (1 + nthr + (nthr + gsz - 1) / gsz + 1) + 1;
      end
      check(n_threads == e, $sformatf("%0d threads run, %0d expected", n_threads, e));
    end
    check(n_stall > 0 && n_deferred > 0, $sformatf("PPU stalled %0d cycles, %0d acknowledgements held back",
                                                   n_stall, n_deferred));
    for (int j = 0; j < NJOBS; j++)
      $display("granularity %0d butterflies/thread (%0d threads per stage): %0d cycles",
               GRAN[j], (N / 2) / GRAN[j], job_cycles[j]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("timeout: threads %0d", n_threads);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
