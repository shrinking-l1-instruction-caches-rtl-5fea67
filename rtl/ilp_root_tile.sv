// ilp_root_tile: root tile (RT) of iLP-NUCA, the first-level instruction cache.
//
// Towards the core the RT behaves like an ordinary L1-I, so the core interface does not
// change: a fetch (req_*) from one of the SMT threads is looked up with a latency of
// two cycles and a new fetch can start every cycle. A hit answers on resp_* two cycles
// after the request. A miss stalls its thread: the RT records it in its MSHRs and, for
// the first miss to a block, injects a search into the search network (inj, registered,
// visible two cycles after the request).
// Blocks come back on the five transport links from the Le2 tiles (one input transport
// buffer each, so the RT multiplexer has five transport inputs) or from the next cache
// level (nl_fill_*). The RT takes one block per cycle, round-robin over these sources:
// it writes the block into its array, answers every thread waiting for it on fresp_*
// and sends the block it displaces to an Le2 tile's replacement buffer (rout_*). A
// block that cannot be taken waits in its buffer, which then signals off upstream.
// From the source design: 8 KB 2-way with 32-byte blocks (the preferred RT), 2-cycle
// pipelined access, two array ports (here one lookup and one fill per cycle), 8 MSHRs,
// five transport inputs, fills from the next level straight into the RT, victims to
// level 2. Own choices: the separate hit and fill answer ports, round-robin fill
// arbitration, forwarding a block filled in the cycle of a lookup as a hit, and
// refusing a fetch from a thread with a miss pending.
module ilp_root_tile
  import ilp_pkg::*;
#(
  parameter int unsigned SETS = 128,    // 8 KB / 32 B / 2 ways
  parameter int unsigned WAYS = 2
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // fetch port
  input  logic                  req_valid,
  input  logic [TID_W-1:0]      req_tid,
  input  logic [ADDR_W-1:0]     req_addr,
  output logic                  req_ready,
  // hit answer (two cycles after the request)
  output logic                  resp_valid,
  output logic [TID_W-1:0]      resp_tid,
  output baddr_t                resp_addr,
  output bdata_t                resp_data,
  // miss answer (block returned to every waiting thread)
  output logic                  fresp_valid,
  output tmask_t                fresp_tmask,
  output baddr_t                fresp_addr,
  output bdata_t                fresp_data,
  // search network injection
  output search_t               inj,
  // transport links from the Le2 tiles
  input  logic [N_LE2-1:0]      tin_valid,
  input  blk_t                  tin_blk [N_LE2],
  output logic [N_LE2-1:0]      tin_off,
  // blocks from the next cache level
  input  logic                  nl_fill_valid,
  input  blk_t                  nl_fill_blk,
  output logic                  nl_fill_ready,
  // replacement network towards the Le2 tiles
  output logic [N_LE2-1:0]      rout_valid,
  output blk_t                  rout_blk,
  input  logic [N_LE2-1:0]      rout_off,
  // event pulses
  output logic                  ev_hit,
  output logic                  ev_miss,
  output logic                  ev_secondary,
  output logic                  ev_forward
);
  localparam int unsigned NSRC = N_LE2 + 1;   // five transport buffers + next level
  localparam int unsigned SW   = $clog2(NSRC);

  // ---------------- input transport buffers ----------------
  logic [NSRC-1:0] src_valid, src_pop;
  blk_t            src_blk [NSRC];

  for (genvar i = 0; i < N_LE2; i++) begin : g_tbf
    ilp_tbuf u_tbf (
      .clk, .rst_n,
      .in_valid(tin_valid[i]), .in_blk(tin_blk[i]), .off(tin_off[i]),
      .out_valid(src_valid[i]), .out_blk(src_blk[i]), .out_pop(src_pop[i])
    );
  end
  assign src_valid[N_LE2] = nl_fill_valid;
  assign src_blk[N_LE2]   = nl_fill_blk;
  assign nl_fill_ready    = src_pop[N_LE2];

  // ---------------- fill multiplexer (round-robin) ----------------
  logic [SW-1:0] rr_q, fsel;
  logic          fcand, fill_en;
  blk_t          fill_blk;
  always_comb begin
    fcand = 1'b0;
    fsel  = '0;
    for (int k = NSRC - 1; k >= 0; k--) begin
      automatic int unsigned i = (int'(rr_q) + k) % NSRC;
      if (src_valid[i]) begin
        fcand = 1'b1;
        fsel  = SW'(i);
      end
    end
    fill_blk = src_blk[fsel];
  end

  // ---------------- array ----------------
  logic                    p1_valid_q;
  logic [TID_W-1:0]        p1_tid_q;
  baddr_t                  p1_addr_q;
  logic                    lk_hit, vic_valid;
  logic [$clog2(WAYS)-1:0] lk_way;
  bdata_t                  lk_data;
  blk_t                    vic_blk;

  ilp_cache_array #(.SETS(SETS), .WAYS(WAYS)) u_array (
    .clk, .rst_n,
    .lk_addr(p1_addr_q), .lk_touch(p1_valid_q), .lk_extract(1'b0),
    .lk_hit, .lk_way, .lk_data,
    .ins_en(fill_en), .ins_blk(fill_blk), .vic_valid, .vic_blk
  );

  // ---------------- victims to level 2 ----------------
  logic route_ready;
  ilp_repl_route #(.N(N_LE2)) u_route (
    .clk, .rst_n, .req(fill_en && vic_valid), .off(rout_off),
    .ready(route_ready), .sel(rout_valid)
  );
  assign rout_blk = vic_blk;

  assign fill_en = fcand && (!vic_valid || route_ready);
  always_comb begin
    src_pop = '0;
    if (fill_en) src_pop[fsel] = 1'b1;
  end

  // ---------------- MSHRs ----------------
  logic   fwd, p1_miss, inject, mshr_full, fill_match;
  logic [MSHR_W-1:0] inject_id;
  tmask_t fill_tmask, thread_wait;

  assign fwd     = p1_valid_q && fill_en && (fill_blk.addr == p1_addr_q);
  assign p1_miss = p1_valid_q && !lk_hit && !fwd;

  ilp_mshr #(.N(MSHR_N)) u_mshr (
    .clk, .rst_n,
    .miss_valid(p1_miss), .miss_addr(p1_addr_q), .miss_tid(p1_tid_q),
    .inject, .inject_id, .full(mshr_full),
    .fill_valid(fill_en), .fill_addr(fill_blk.addr),
    .fill_match, .fill_tmask, .thread_wait
  );

  // a stalled thread may not fetch; neither may the thread whose miss is found now
  assign req_ready = !thread_wait[req_tid] && !(p1_miss && p1_tid_q == req_tid);

  // ---------------- pipeline registers ----------------
  logic              inj_valid_q;
  logic [MSHR_W-1:0] inj_id_q;
  baddr_t            inj_addr_q;
  assign inj = '{valid: inj_valid_q, id: inj_id_q, addr: inj_addr_q};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p1_valid_q  <= 1'b0;
      resp_valid  <= 1'b0;
      fresp_valid <= 1'b0;
      inj_valid_q <= 1'b0;
      rr_q        <= '0;
    end else begin
      p1_valid_q <= req_valid && req_ready;
      resp_valid <= p1_valid_q && (lk_hit || fwd);
      fresp_valid <= fill_en && fill_match;
      inj_valid_q <= inject;
      if (fill_en) rr_q <= (fsel == SW'(NSRC - 1)) ? '0 : fsel + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    p1_tid_q    <= req_tid;
    p1_addr_q   <= req_addr[ADDR_W-1:OFFS_W];
    resp_tid    <= p1_tid_q;
    resp_addr   <= p1_addr_q;
    resp_data   <= fwd ? fill_blk.data : lk_data;
    fresp_tmask <= fill_tmask;
    fresp_addr  <= fill_blk.addr;
    fresp_data  <= fill_blk.data;
    inj_id_q    <= inject_id;
    inj_addr_q  <= p1_addr_q;
  end

  assign ev_hit       = p1_valid_q && lk_hit;
  assign ev_forward   = fwd && !lk_hit;
  assign ev_miss      = inject;
  assign ev_secondary = p1_miss && !inject;

  a_fill_was_requested: assert property (@(posedge clk) disable iff (!rst_n)
    fill_en |-> fill_match)
    else $error("ilp_root_tile: block arrived that no MSHR waits for");
  a_mshr_room: assert property (@(posedge clk) disable iff (!rst_n) !(p1_miss && mshr_full && !ev_secondary))
    else $error("ilp_root_tile: MSHRs full");
endmodule
