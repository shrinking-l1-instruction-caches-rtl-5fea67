// ilp_cfg_harness: iLP-NUCA with a four-thread fetch model and a next-level model,
// for running the same traffic through differently sized root tiles.
// Each thread fetches one block at a time (mostly a private loop of 30 to 90 blocks,
// sometimes shared or scattered code) and waits for the answer; the next level answers after NL_LAT cycles
// with data computed from the address. Every answer is compared with that data.
// Outputs: checks/failures so far, fetches done, and how many answers came from the
// root tile, from the tiles (levels 2 and 3) and from the next level.
module ilp_cfg_harness
  import ilp_pkg::*;
#(
  parameter int unsigned RT_SETS = 128,
  parameter int unsigned RT_WAYS = 2,
  parameter int unsigned NL_LAT  = 14,
  parameter int unsigned SEED    = 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic go,
  output int   checks,
  output int   failures,
  output int   fetches,
  output int   n_rt,
  output int   n_tiles,
  output int   n_next
);
  logic              req_valid, req_ready, resp_valid, fresp_valid;
  logic [TID_W-1:0]  req_tid, resp_tid;
  logic [ADDR_W-1:0] req_addr;
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

  ilp_nuca #(.RT_SETS(RT_SETS), .RT_WAYS(RT_WAYS)) dut (.*);

  function automatic bdata_t dat(baddr_t a);
    bdata_t d;
    for (int i = 0; i < 8; i++) d[32*i +: 32] = a * 32'h9E37_79B9 + 32'(i) * 32'h85EB_CA6B;
    return d;
  endfunction

  // next level
  int     nl_due[$];
  baddr_t nl_addr[$];
  assign nl_req_ready  = 1'b1;
  assign nl_fill_valid = nl_due.size() != 0 && nl_due[0] <= cyc;
  assign nl_fill_blk   = '{addr: (nl_addr.size() != 0) ? nl_addr[0] : '0,
                           data: dat((nl_addr.size() != 0) ? nl_addr[0] : '0)};

  // threads
  int     cyc = 0;
  bit     busy [NTHREADS] = '{default: 0};
  baddr_t want [NTHREADS];
  baddr_t nxt  [NTHREADS] = '{default: '0};
  int     pos  [NTHREADS] = '{default: 0};
  int     rr = 0;

  always_comb begin
    req_valid = 1'b0; req_tid = '0; req_addr = '0;
    for (int k = NTHREADS - 1; k >= 0; k--) begin
      automatic int t = (rr + k) % NTHREADS;
      if (go && !busy[t]) begin
        req_valid = 1'b1; req_tid = TID_W'(t); req_addr = ADDR_W'(nxt[t]) << OFFS_W;
      end
    end
  end

  initial begin
    checks = 0; failures = 0; fetches = 0; n_rt = 0; n_tiles = 0; n_next = 0;
    void'($urandom(SEED));
  end

  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (nl_fill_valid && nl_fill_ready) begin void'(nl_due.pop_front()); void'(nl_addr.pop_front()); end
    if (nl_req_valid) begin nl_due.push_back(cyc + NL_LAT); nl_addr.push_back(nl_req_addr); n_next++; end
    if (stat_hit_le2 != '0 || stat_hit_le3 != '0) n_tiles++;
    if (resp_valid) begin
      checks++;
      if (!(busy[resp_tid] && resp_addr == want[resp_tid] && resp_data == dat(want[resp_tid]))) failures++;
      busy[resp_tid] <= 0; fetches++; n_rt++;
    end
    if (fresp_valid)
      for (int r = 0; r < NTHREADS; r++) if (fresp_tmask[r]) begin
        checks++;
        if (!(busy[r] && fresp_addr == want[r] && fresp_data == dat(want[r]))) failures++;
        busy[r] <= 0; fetches++;
      end
    if (req_valid && req_ready) begin
      busy[req_tid] <= 1; want[req_tid] <= nxt[req_tid];
      rr <= (int'(req_tid) + 1) % NTHREADS;
    end
    if (req_valid && req_ready) begin
      automatic int r = int'(req_tid);
      automatic int unsigned x = $urandom_range(0, 99);
      if (x < 8) nxt[r] <= baddr_t'(60000 + $urandom_range(0, 15));
      else if (x < 12) nxt[r] <= baddr_t'(r * 200000 + 100000 + $urandom_range(0, 20000));
      else begin
        pos[r] <= (pos[r] + 1) % (30 + 20 * r);
        nxt[r] <= baddr_t'(r * 200000 + pos[r]);
      end
    end
  end
endmodule
