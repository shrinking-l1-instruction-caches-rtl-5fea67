// tb_ilp_nuca: end-to-end test of the iLP-NUCA instruction cache at its full size.
//
// A small SMT core model runs 1, then 2, then 4 threads. Each thread fetches one block
// at a time and waits for the answer (a fetch miss stalls the thread); the core offers
// one fetch per cycle, rotating over the threads. The next cache level is a model that
// answers every request 14 cycles later (the L3 latency of the evaluated system) with
// data computed from the address, so every answer can be checked.
//
// Phase 1 (one thread) walks a set of blocks that all map to the same set of the root
// tile and of the tiles, so blocks are pushed into level 2 and level 3 and come back;
// here the exact latencies are checked: 2 cycles for a root-tile hit, 5 for a level-2
// hit and 7 for a level-3 hit (3 and 5 cycles after the search is injected).
// Phases 2 and 3 (two and four threads) run private loops plus a shared region, so
// that threads miss on the same block. The test counts every mechanism of the design
// and fails if one never happened: root-tile hit, primary and secondary miss, fill
// forwarded to a lookup, thread stall, hits in level 2, level 3 and in a replacement
// buffer, next-level fill, victims from the root tile, from level 2 and out of level
// 3, transport back-pressure (a buffer off) and a placement held by a search.
module tb_ilp_nuca;
  import ilp_pkg::*;
  localparam int unsigned NL_LAT = 14;
  localparam int unsigned RT_SETS = 128, TILE_SETS = 512;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a real falling edge: the asynchronous reset acts before the first clock
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic              req_valid, req_ready;
  logic [TID_W-1:0]  req_tid, resp_tid;
  logic [ADDR_W-1:0] req_addr;
  logic              resp_valid, fresp_valid;
  baddr_t            resp_addr, fresp_addr, nl_req_addr;
  bdata_t            resp_data, fresp_data;
  tmask_t            fresp_tmask;
  logic              nl_req_valid, nl_req_ready, nl_fill_valid, nl_fill_ready;
  logic [MSHR_W-1:0] nl_req_id;
  blk_t              nl_fill_blk;
  logic [N_LE3-1:0]  ev_valid;
  blk_t              ev_blk [N_LE3];
  logic              stat_hit, stat_miss, stat_secondary, stat_forward;
  logic [N_LE2-1:0]  stat_hit_le2;
  logic [N_LE3-1:0]  stat_hit_le3;

  ilp_nuca dut (.*);

  function automatic bdata_t dat(baddr_t a);
    bdata_t d;
    for (int i = 0; i < 8; i++) d[32*i +: 32] = a * 32'h9E37_79B9 + 32'(i) * 32'h85EB_CA6B;
    return d;
  endfunction
  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  // ---------------- next cache level model ----------------
  int     nl_due[$];
  baddr_t nl_addr[$];
  int     n_nl = 0;
  assign nl_req_ready  = 1'b1;
  assign nl_fill_valid = nl_due.size() != 0 && nl_due[0] <= cyc;
  assign nl_fill_blk   = '{addr: (nl_addr.size() != 0) ? nl_addr[0] : '0,
                           data: dat((nl_addr.size() != 0) ? nl_addr[0] : '0)};
  always @(posedge clk) if (rst_n) begin
    if (nl_fill_valid && nl_fill_ready) begin
      void'(nl_due.pop_front()); void'(nl_addr.pop_front()); n_nl++;
    end
    if (nl_req_valid) begin nl_due.push_back(cyc + NL_LAT); nl_addr.push_back(nl_req_addr); end
  end

  // ---------------- SMT core model ----------------
  int     nthr = 1;
  bit     busy [NTHREADS];
  baddr_t want [NTHREADS];
  int     t_req [NTHREADS];
  int     done [NTHREADS];
  int     lvl [NTHREADS];      // 1 RT, 2 Le2, 3 Le3, 4 next level
  int     rr = 0;
  int     stalls = 0;
  bit     check_lat = 0;
  bit     fetch_go = 0;
  baddr_t next_addr [NTHREADS];
  int     lat_ok [5] = '{default: 0};

  always_comb begin
    req_valid = 1'b0; req_tid = '0; req_addr = '0;
    for (int k = NTHREADS - 1; k >= 0; k--) begin
      automatic int t = (rr + k) % NTHREADS;
      if (fetch_go && t < nthr && !busy[t]) begin
        req_valid = 1'b1; req_tid = TID_W'(t); req_addr = ADDR_W'(next_addr[t]) << OFFS_W;
      end
    end
  end

  always @(posedge clk) if (rst_n) begin
    automatic int t = int'(req_tid);
    // answers
    if (resp_valid) begin
      automatic int r = int'(resp_tid);
      chk(busy[r] && resp_addr == want[r] && resp_data == dat(want[r]), "hit answer");
      if (check_lat) chk(cyc - t_req[r] == 2, "root-tile hit latency");
      busy[r] <= 0; done[r]++; lat_ok[1]++;
    end
    if (fresp_valid)
      for (int r = 0; r < NTHREADS; r++)
        if (fresp_tmask[r]) begin
          chk(busy[r] && fresp_addr == want[r] && fresp_data == dat(want[r]), "miss answer");
          if (check_lat && lvl[r] == 2) chk(cyc - t_req[r] == 5, "level-2 latency");
          if (check_lat && lvl[r] == 3) chk(cyc - t_req[r] == 7, "level-3 latency");
          lat_ok[lvl[r]]++;
          busy[r] <= 0; done[r]++;
        end
    // which level answered the outstanding miss (one thread in phase 1)
    for (int r = 0; r < NTHREADS; r++) if (busy[r]) begin
      if (stat_hit_le2 != '0) lvl[r] = 2;
      if (stat_hit_le3 != '0) lvl[r] = 3;
      if (nl_req_valid) lvl[r] = 4;
    end
    // a thread that wants to fetch but is refused is stalled
    for (int r = 0; r < nthr; r++) if (busy[r] && fetch_go) stalls++;
    if (req_valid && req_ready) begin
      busy[t] <= 1; want[t] <= next_addr[t]; t_req[t] <= cyc; lvl[t] <= 1;
      rr <= (t + 1) % NTHREADS;
    end
  end

  // ---------------- mechanism counters ----------------
  int n_hit = 0, n_miss = 0, n_sec = 0, n_fwd = 0, n_le2 = 0, n_le3 = 0, n_rbf = 0;
  int n_vrt = 0, n_v2 = 0, n_v3 = 0, n_off = 0, n_hold = 0;
  always @(posedge clk) if (rst_n) begin
    if (stat_hit) n_hit++;
    if (stat_miss) n_miss++;
    if (stat_secondary) n_sec++;
    if (stat_forward) n_fwd++;
    if (stat_hit_le2 != '0) n_le2++;
    if (stat_hit_le3 != '0) n_le3++;
    if (dut.rt_rout_valid != '0) n_vrt++;
    if (dut.l3_rin_valid != '0) n_v2++;
    if (ev_valid != '0) n_v3++;
    if (dut.rt_tin_off != '0 || dut.l3_tout_off != '0) n_off++;
  end
  for (genvar p = 0; p < N_LE2; p++) begin : g_m2
    always @(posedge clk) if (rst_n) begin
      if (dut.g_le2[p].u_tile.rbf_hit && dut.g_le2[p].u_tile.srch.valid) n_rbf++;
      if (dut.g_le2[p].u_tile.rbf_out_valid && dut.hold_repl) n_hold++;
    end
  end
  for (genvar k = 0; k < N_LE3; k++) begin : g_m3
    always @(posedge clk)
      if (rst_n && dut.g_le3[k].u_tile.rbf_hit && dut.g_le3[k].u_tile.srch.valid) n_rbf++;
  end

  // ---------------- stimulus ----------------
  task automatic run_thread0(int unsigned a);
    next_addr[0] = baddr_t'(a);
    @(negedge clk);
    while (!busy[0]) @(negedge clk);
    while (busy[0]) @(negedge clk);
  endtask

  int unsigned pos [NTHREADS];
  int unsigned loop_len [NTHREADS];
  int target;

  initial begin
    for (int r = 0; r < NTHREADS; r++) begin busy[r] = 0; done[r] = 0; next_addr[r] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // ---- phase 1: one thread, blocks of one set, exact latencies ----
    check_lat = 1;
    fetch_go = 1;
    // first: the fetch port must refuse a thread with a miss outstanding
    for (int pass = 0; pass < 6; pass++)
      for (int k = 0; k < 16; k++)
        run_thread0(7 + k * TILE_SETS);
    for (int pass = 0; pass < 4; pass++)
      for (int k = 0; k < 6; k++)
        run_thread0(7 + k * TILE_SETS);
    chk(lat_ok[2] > 0 && lat_ok[3] > 0 && lat_ok[4] > 0, "phase 1 reached every level");
    begin
      automatic int nl_before = n_nl;
      for (int pass = 0; pass < 4; pass++)
        for (int k = 0; k < 6; k++)
          run_thread0(7 + k * TILE_SETS);
      chk(n_nl == nl_before, "six blocks of one set stay inside iLP-NUCA");
    end
    check_lat = 0;
    // ---- phases 2 and 3: two and four threads ----
    for (int ph = 2; ph <= 4; ph += 2) begin
      fetch_go = 0;
      @(negedge clk);
      nthr = ph;
      for (int r = 0; r < NTHREADS; r++) begin
        pos[r] = 0;
        loop_len[r] = 40 + 60 * r;
      end
      target = done[0] + 1500;
      fetch_go = 1;
      while (done[0] < target) begin
        @(negedge clk);
        for (int r = 0; r < nthr; r++) if (!busy[r]) begin
          automatic int unsigned x = $urandom_range(0, 99);
          if (x < 10) next_addr[r] = baddr_t'(50000 + $urandom_range(0, 7));   // shared code
          else if (x < 15) next_addr[r] = baddr_t'(r * 100000 + 20000 + $urandom_range(0, 4000));
          else begin
            pos[r] = (pos[r] + 1) % loop_len[r];
            // private loop, every fourth block in one tile set to add conflicts
            next_addr[r] = baddr_t'(r * 100000 + ((pos[r] % 4 == 0) ? pos[r] * TILE_SETS : pos[r]));
          end
        end
      end
    end
    // ---- phase 4: four threads on twelve blocks of one set (constant conflicts) ----
    target = done[0] + 600;
    while (done[0] < target) begin
      @(negedge clk);
      for (int r = 0; r < nthr; r++) if (!busy[r])
        next_addr[r] = baddr_t'(900 + $urandom_range(0, 11) * TILE_SETS);
    end
    // ---- phase 5: a second thread asks for a block d cycles after the first ----
    fetch_go = 0;
    while (busy[0] || busy[1] || busy[2] || busy[3]) @(negedge clk);
    nthr = 2;
    for (int d = 12; d < 24; d++) begin
      next_addr[0] = baddr_t'(70000 + d);
      next_addr[1] = baddr_t'(70000 + d);
      nthr = 1; fetch_go = 1;
      repeat (d) @(negedge clk);
      nthr = 2;
      while (!busy[1] && !(done[1] > 0 && want[1] == baddr_t'(70000 + d))) @(negedge clk);
      fetch_go = 0;
      while (busy[0] || busy[1]) @(negedge clk);
    end
    fetch_go = 0;
    repeat (60) @(negedge clk);
    for (int r = 0; r < NTHREADS; r++) chk(!busy[r], "every fetch answered");
    chk(n_hit > 0, "root-tile hits");
    chk(n_miss > 0, "primary misses");
    chk(n_sec > 0, "secondary misses merged");
    chk(n_fwd > 0, "fill forwarded to a lookup");
    chk(stalls > 0, "threads stalled on a miss");
    chk(n_le2 > 0, "level-2 hits");
    chk(n_le3 > 0, "level-3 hits");
    chk(n_rbf > 0, "replacement-buffer hits");
    chk(n_nl > 0, "next-level fills");
    chk(n_vrt > 0, "root-tile victims to level 2");
    chk(n_v2 > 0, "level-2 victims to level 3");
    chk(n_v3 > 0, "victims leaving level 3");
    chk(n_off > 0, "transport back-pressure");
    chk(n_hold > 0, "placement held by a search");
    $display("fetches t0..t3: %0d %0d %0d %0d", done[0], done[1], done[2], done[3]);
    $display("rt hits %0d, misses %0d, secondary %0d, forwarded %0d, le2 hits %0d, le3 hits %0d, rbf hits %0d, next level %0d",
             n_hit, n_miss, n_sec, n_fwd, n_le2, n_le3, n_rbf, n_nl);
    $display("victims rt %0d, le2 %0d, out of le3 %0d; cycles with a buffer off %0d, held placements %0d, stall cycles %0d",
             n_vrt, n_v2, n_v3, n_off, n_hold, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
