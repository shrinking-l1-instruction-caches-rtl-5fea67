// tb_ilp_root_tile: self-checking test of the root tile (first-level instruction cache).
// Checks: a miss injects a search two cycles after the request and stalls its thread; a
// second thread missing on the same block is merged (no second search); a block on a
// transport link is answered to both threads two cycles after it enters the link
// buffer; a hit answers two cycles after the request with the right data; fills from
// the next level; the displaced block goes out on the replacement network (round-robin
// over the level-2 tiles) and is the least recently used one; a block filled in the
// lookup cycle of a request for it is forwarded as a hit; with every level-2 replacement
// buffer off, fills wait and the link buffer signals off. A random phase then runs four
// threads against a model of the tiles and the next level, with random link delays and
// back-pressure, and checks every answer, every hit or miss decision against a model of
// the RT content, every victim, and that no block is searched for twice at once.
module tb_ilp_root_tile;
  import ilp_pkg::*;
  localparam int unsigned SETS = 128;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a real falling edge: the asynchronous reset acts before the first clock
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic              req_valid = 0, req_ready;
  logic [TID_W-1:0]  req_tid = '0, resp_tid;
  logic [ADDR_W-1:0] req_addr = '0;
  logic              resp_valid, fresp_valid;
  baddr_t            resp_addr, fresp_addr;
  bdata_t            resp_data, fresp_data;
  tmask_t            fresp_tmask;
  search_t           inj;
  logic [N_LE2-1:0]  tin_valid = '0, tin_off, rout_valid, rout_off = '0;
  blk_t              tin_blk [N_LE2];
  logic              nl_fill_valid = 0, nl_fill_ready;
  blk_t              nl_fill_blk = '0, rout_blk;
  logic              ev_hit, ev_miss, ev_secondary, ev_forward;

  ilp_root_tile dut (.*);

  function automatic blk_t mk(int unsigned n);
    blk_t r; r.addr = baddr_t'(n); r.data = {8{n * 32'h6C07_8965 + 32'd3}}; return r;
  endfunction
  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask
  // issue a fetch of block n for thread t; returns the cycle it was accepted
  task automatic fetch(int unsigned n, int t, output int c);
    req_valid = 1; req_tid = TID_W'(t); req_addr = ADDR_W'(n) << OFFS_W;
    #1;
    chk(req_ready, "fetch accepted");
    c = cyc;
    @(negedge clk);
    req_valid = 0;
  endtask

  // monitors
  int inj_cyc, inj_cnt = 0, fresp_cyc, hit_cyc, rout_cnt = 0, fwd_cnt = 0;
  baddr_t inj_addr;
  tmask_t last_tmask;
  blk_t   last_fresp, last_resp, last_rout;
  logic [N_LE2-1:0] rout_hist [$];
  always @(posedge clk) if (rst_n) begin
    if (inj.valid) begin inj_cyc = cyc; inj_cnt++; inj_addr = inj.addr; end
    if (fresp_valid) begin fresp_cyc = cyc; last_tmask = fresp_tmask; last_fresp = '{fresp_addr, fresp_data}; end
    if (resp_valid) begin hit_cyc = cyc; last_resp = '{resp_addr, resp_data}; end
    if (rout_valid != '0) begin rout_cnt++; last_rout = rout_blk; rout_hist.push_back(rout_valid); end
    if (ev_forward) fwd_cnt++;
  end

  // ---- random phase ----
  // Content model of the RT: a block is in the array from its fill until it leaves as a
  // victim. Each accepted fetch is checked against that model when its lookup ends.
  bit     rnd_on = 0, rnd_stop = 0;
  bit     r_in_rt [int unsigned];
  bit     r_out [int unsigned];                 // searches in flight
  bit     r_busy [NTHREADS] = '{default: 0};
  int     r_want [NTHREADS], r_acc_cyc [NTHREADS];
  int     r_pend_addr [$], r_pend_due [$], r_pend_src [$];
  int     r_nl [$];
  int     r_acc = 0, r_hits = 0, r_miss = 0, r_sec = 0, r_vic = 0;
  logic   l_valid = 0, l_exp = 0;
  int     l_tid, l_addr;
  bit     p_valid = 0; int p_tid, p_addr;

  function automatic int unsigned r_pick();
    return (int'($urandom_range(0, 3)) * 37 + 6) % SETS + SETS * $urandom_range(0, 4);
  endfunction

  // stimulus, changed after each falling edge
  always @(negedge clk) if (rnd_on) begin
    automatic int t = $urandom_range(0, NTHREADS - 1);
    req_valid = 0; tin_valid = '0; nl_fill_valid = 0;
    if (!rnd_stop && !r_busy[t] && $urandom_range(0, 2) != 0) begin
      req_valid = 1; req_tid = TID_W'(t); req_addr = ADDR_W'(r_pick()) << OFFS_W;
    end
    rout_off = ($urandom_range(0, 4) == 0) ? N_LE2'($urandom) : '0;
    for (int i = 0; i < r_pend_addr.size(); i++)
      if (r_pend_due[i] <= cyc && r_pend_src[i] < N_LE2 && !tin_off[r_pend_src[i]]
          && !tin_valid[r_pend_src[i]]) begin
        tin_valid[r_pend_src[i]] = 1; tin_blk[r_pend_src[i]] = mk(r_pend_addr[i]);
        r_pend_due[i] = 32'h7fff_ffff;            // delivered, removed at the next edge
      end else if (r_pend_due[i] <= cyc && r_pend_src[i] == N_LE2) begin
        r_nl.push_back(r_pend_addr[i]);
        r_pend_due[i] = 32'h7fff_ffff;
      end
    if (r_nl.size() != 0) begin nl_fill_valid = 1; nl_fill_blk = mk(r_nl[0]); end
  end

  always @(posedge clk) if (rnd_on && rst_n) begin
    // the lookup of the fetch accepted one edge ago ends now
    if (l_valid) begin
      chk(resp_valid == l_exp, "hit or miss agrees with the content model");
      if (resp_valid) begin
        chk(int'(resp_tid) == l_tid && resp_addr == baddr_t'(l_addr) && resp_data == mk(l_addr).data,
            "hit answer carries the fetched block");
        r_busy[l_tid] = 0; r_hits++;
      end
    end
    l_valid = 0;
    if (p_valid) begin
      l_valid = 1; l_tid = p_tid; l_addr = p_addr;
      l_exp = r_in_rt.exists(p_addr) || (dut.fill_en && int'(dut.fill_blk.addr) == p_addr);
    end
    p_valid = 0;
    if (fresp_valid) begin
      for (int t = 0; t < NTHREADS; t++) if (fresp_tmask[t]) begin
        chk(r_busy[t] && r_want[t] == int'(fresp_addr) && fresp_data == mk(r_want[t]).data,
            "miss answer goes to a thread waiting for that block");
        r_busy[t] = 0;
      end
    end
    if (dut.fill_en) r_in_rt[int'(dut.fill_blk.addr)] = 1;
    if (rout_valid != '0) begin
      r_vic++;
      chk($onehot(rout_valid) && r_in_rt.exists(int'(rout_blk.addr)) && rout_blk == mk(int'(rout_blk.addr)),
          "victim is a block of the RT, sent to one tile");
      r_in_rt.delete(int'(rout_blk.addr));
    end
    if (inj.valid) begin
      chk(!r_out.exists(int'(inj.addr)), "no second search for a block in flight");
      r_out[int'(inj.addr)] = 1; r_miss++;
      r_pend_addr.push_back(int'(inj.addr));
      r_pend_due.push_back(cyc + int'($urandom_range(2, 12)));
      r_pend_src.push_back(int'($urandom_range(0, N_LE2)));
    end
    if (ev_secondary) r_sec++;
    for (int i = 0; i < N_LE2; i++) if (tin_valid[i]) r_out.delete(int'(tin_blk[i].addr));
    if (nl_fill_valid && nl_fill_ready) begin r_out.delete(r_nl[0]); void'(r_nl.pop_front()); end
    for (int i = r_pend_addr.size() - 1; i >= 0; i--)
      if (r_pend_due[i] == 32'h7fff_ffff) begin
        r_pend_addr.delete(i); r_pend_due.delete(i); r_pend_src.delete(i);
      end
    if (req_valid && req_ready) begin
      r_acc++;
      chk(!r_busy[req_tid], "a waiting thread is not accepted");
      r_busy[req_tid] = 1; r_want[req_tid] = int'(req_addr >> OFFS_W); r_acc_cyc[req_tid] = cyc;
      p_valid = 1; p_tid = int'(req_tid); p_addr = int'(req_addr >> OFFS_W);
    end
  end

  int c0, c1, c2, tmp;
  initial begin
    for (int i = 0; i < N_LE2; i++) tin_blk[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // primary miss, thread 0
    fetch(10, 0, c0);
    @(negedge clk);
    @(negedge clk);
    chk(inj_cnt == 1 && inj_cyc == c0 + 2 && inj_addr == baddr_t'(10), "search injected two cycles after request");
    req_tid = 0; #1;
    chk(!req_ready, "thread 0 stalled");
    // secondary miss, thread 1
    fetch(10, 1, c1);
    repeat (3) @(negedge clk);
    chk(inj_cnt == 1, "secondary miss sends no search");
    // block returns on link 3
    tin_valid[3] = 1; tin_blk[3] = mk(10); c2 = cyc;
    @(negedge clk);
    tin_valid = '0;
    @(negedge clk);
    @(negedge clk);
    chk(fresp_cyc == c2 + 2 && last_tmask == 4'b0011 && last_fresp == mk(10), "block answered to both threads");
    req_tid = 0; #1;
    chk(req_ready, "thread 0 released");
    // hit
    fetch(10, 2, c0);
    @(negedge clk);
    @(negedge clk);
    chk(hit_cyc == c0 + 2 && last_resp == mk(10), "hit after two cycles");
    // two more blocks in the same set: the second displaces block 10's neighbour
    fetch(10 + SETS, 0, c0);
    repeat (3) @(negedge clk);
    nl_fill_valid = 1; nl_fill_blk = mk(10 + SETS);
    #1; chk(nl_fill_ready, "next-level fill taken");
    @(negedge clk);
    nl_fill_valid = 0;
    @(negedge clk);
    chk(last_fresp == mk(10 + SETS), "next-level block answered");
    fetch(10, 1, c0);                // touch 10: 10+SETS becomes LRU
    @(negedge clk);
    fetch(10 + 2 * SETS, 3, c0);
    repeat (3) @(negedge clk);
    nl_fill_valid = 1; nl_fill_blk = mk(10 + 2 * SETS);
    @(negedge clk);
    nl_fill_valid = 0;
    @(negedge clk);
    chk(rout_cnt == 1 && last_rout == mk(10 + SETS), "LRU victim sent to level 2");
    // more victims rotate over the level-2 tiles
    for (int i = 3; i < 8; i++) begin
      fetch(10 + i * SETS, i % NTHREADS, c0);
      repeat (3) @(negedge clk);
      tin_valid[i % N_LE2] = 1; tin_blk[i % N_LE2] = mk(10 + i * SETS);
      @(negedge clk);
      tin_valid = '0;
      repeat (2) @(negedge clk);
    end
    chk(rout_cnt == 6, "one victim per fill");
    for (int i = 0; i < 5; i++) chk(rout_hist[i] == N_LE2'(1 << i), "victims rotate over level 2");
    // forwarding: thread 1 waits for block 500; thread 2 asks for it in the fill cycle
    fetch(500, 1, c0);
    repeat (3) @(negedge clk);
    req_valid = 1; req_tid = 2; req_addr = ADDR_W'(500) << OFFS_W;
    tin_valid[0] = 1; tin_blk[0] = mk(500);
    @(negedge clk);
    req_valid = 0; tin_valid = '0;
    @(negedge clk);
    @(negedge clk);
    chk(fwd_cnt == 1 && last_resp == mk(500), "fill forwarded to a lookup in the same cycle");
    chk(inj_cnt == 9, "forwarded lookup sent no search");
    // back-pressure: all level-2 replacement buffers off
    rout_off = '1;
    fetch(10 + 9 * SETS, 0, c0);
    fetch(12345, 2, c0);
    repeat (3) @(negedge clk);
    tmp = rout_cnt;
    tin_valid[1] = 1; tin_blk[1] = mk(10 + 9 * SETS);
    @(negedge clk);
    tin_valid = '0;
    @(negedge clk);
    @(negedge clk);
    chk(fresp_cyc < cyc - 3 && rout_cnt == tmp, "fill waits while level 2 is off");
    tin_valid[1] = 1; tin_blk[1] = mk(12345);
    @(negedge clk);
    tin_valid = '0;
    chk(tin_off[1], "link buffer off when full");
    rout_off = '0;
    @(negedge clk);
    @(negedge clk);
    chk(last_fresp == mk(10 + 9 * SETS) && rout_cnt == tmp + 1, "fill completes when level 2 is on");
    @(negedge clk);
    chk(last_fresp == mk(12345) && last_tmask == 4'b0100, "queued block follows");
    // random phase: four threads, a model of the rest of the hierarchy, random back-pressure
    repeat (5) @(negedge clk);
    rnd_on = 1;
    repeat (6000) @(negedge clk);
    rnd_stop = 1;
    repeat (60) @(negedge clk);
    rnd_on = 0;
    for (int t = 0; t < NTHREADS; t++) chk(!r_busy[t], "every random fetch answered");
    chk(r_pend_addr.size() == 0 && r_nl.size() == 0 && r_out.size() == 0, "every search answered");
    chk(r_hits > 200 && r_miss > 200 && r_sec > 20 && r_vic > 200, "random phase exercised hits, misses, merges and victims");
    $display("random phase: %0d fetches, %0d hits, %0d searches, %0d merged, %0d victims",
             r_acc, r_hits, r_miss, r_sec, r_vic);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
