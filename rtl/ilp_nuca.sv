// ilp_nuca: iLP-NUCA, a three-level instruction cache for an SMT embedded core.
//
// The root tile (RT) is the core's L1-I; around it sit 5 level-2 tiles and 9 level-3
// tiles of 32 KB each, which together take the place of a conventional L2-I. A fetch
// that misses in the RT is broadcast by the search network, one level per cycle; the
// tile holding the block removes it and sends it back over the tree-based transport
// network: every Le2 tile has its own link into the RT and every Le3 tile a link into
// one Le2 tile, so a block found in level 2 returns 3 cycles after the search was
// injected and one found in level 3 after 5 cycles (one-cycle tile access, one cycle
// per hop). A search that no tile answers goes out on nl_req_* to the next cache level,
// whose block (nl_fill_*) is written straight into the RT. Every block the RT writes
// displaces one, which the replacement network moves into an Le2 tile; that tile's own
// victim moves into one of its Le3 tiles, and victims of level 3 leave on ev_*.
//
// Interface: fetch requests on req_* (one per cycle, any thread not stalled on a miss),
// hit answers on resp_* two cycles later, miss answers on fresp_* with the mask of the
// threads that waited for the block. ev_* carries the level-3 victims; instruction
// blocks are never dirty, so the next level may drop them. stat_* are event pulses.
// From the source design: sizes, levels, tile counts, the tree transport topology with
// its latencies, the search and replacement directions. Own choices: which Le3 tile
// hangs off which Le2 tile (ilp_pkg::LE3_PARENT), the replacement network following
// the same tree, and everything listed as such in the sub-modules.
module ilp_nuca
  import ilp_pkg::*;
#(
  parameter int unsigned RT_SETS   = 128,   // 8 KB 2-way root tile
  parameter int unsigned RT_WAYS   = 2,
  parameter int unsigned TILE_SETS = 512,   // 32 KB 2-way tiles
  parameter int unsigned TILE_WAYS = 2
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // fetch port of the SMT core
  input  logic                  req_valid,
  input  logic [TID_W-1:0]      req_tid,
  input  logic [ADDR_W-1:0]     req_addr,
  output logic                  req_ready,
  output logic                  resp_valid,
  output logic [TID_W-1:0]      resp_tid,
  output baddr_t                resp_addr,
  output bdata_t                resp_data,
  output logic                  fresp_valid,
  output tmask_t                fresp_tmask,
  output baddr_t                fresp_addr,
  output bdata_t                fresp_data,
  // next cache level
  output logic                  nl_req_valid,
  output logic [MSHR_W-1:0]     nl_req_id,
  output baddr_t                nl_req_addr,
  input  logic                  nl_req_ready,
  input  logic                  nl_fill_valid,
  input  blk_t                  nl_fill_blk,
  output logic                  nl_fill_ready,
  output logic [N_LE3-1:0]      ev_valid,
  output blk_t                  ev_blk [N_LE3],
  // event pulses
  output logic                  stat_hit,
  output logic                  stat_miss,
  output logic                  stat_secondary,
  output logic                  stat_forward,
  output logic [N_LE2-1:0]      stat_hit_le2,
  output logic [N_LE3-1:0]      stat_hit_le3
);
  search_t inj, srch_le2, srch_le3;
  logic    hold_repl;
  logic [N_LE2-1:0] hit_le2;
  logic [N_LE3-1:0] hit_le3;

  // RT <-> Le2 links
  logic [N_LE2-1:0] rt_tin_valid, rt_tin_off, rt_rout_valid, rt_rout_off;
  blk_t             rt_tin_blk [N_LE2];
  blk_t             rt_rout_blk;

  // Le2 <-> Le3 links, indexed by Le3 tile
  logic [N_LE3-1:0] l3_tout_valid, l3_tout_off, l3_rin_valid, l3_rin_off;
  blk_t             l3_tout_blk [N_LE3];
  blk_t             l3_rin_blk  [N_LE3];

  ilp_root_tile #(.SETS(RT_SETS), .WAYS(RT_WAYS)) u_rt (
    .clk, .rst_n,
    .req_valid, .req_tid, .req_addr, .req_ready,
    .resp_valid, .resp_tid, .resp_addr, .resp_data,
    .fresp_valid, .fresp_tmask, .fresp_addr, .fresp_data,
    .inj,
    .tin_valid(rt_tin_valid), .tin_blk(rt_tin_blk), .tin_off(rt_tin_off),
    .nl_fill_valid, .nl_fill_blk, .nl_fill_ready,
    .rout_valid(rt_rout_valid), .rout_blk(rt_rout_blk), .rout_off(rt_rout_off),
    .ev_hit(stat_hit), .ev_miss(stat_miss), .ev_secondary(stat_secondary),
    .ev_forward(stat_forward)
  );

  ilp_search_net u_search (
    .clk, .rst_n, .inj,
    .srch_le2, .hit_le2, .srch_le3, .hit_le3, .hold_repl,
    .nl_req_valid, .nl_req_id, .nl_req_addr, .nl_req_ready
  );

  assign stat_hit_le2 = hit_le2;
  assign stat_hit_le3 = hit_le3;

  // ---------------- level 2 ----------------
  for (genvar p = 0; p < N_LE2; p++) begin : g_le2
    localparam int unsigned NCH = le2_nchild(p);
    logic [T_IN-1:0] tin_valid, tin_off, rout_valid, rout_off;
    blk_t            tin_blk [T_IN];
    blk_t            rout_blk, ev_blk_unused;
    logic            ev_valid_unused;

    for (genvar s = 0; s < T_IN; s++) begin : g_child
      localparam int unsigned C = le2_child(p, s);
      if (C < N_LE3) begin : g_yes
        assign tin_valid[s]        = l3_tout_valid[C];
        assign tin_blk[s]          = l3_tout_blk[C];
        assign l3_tout_off[C]      = tin_off[s];
        assign l3_rin_valid[C]     = rout_valid[s];
        assign l3_rin_blk[C]       = rout_blk;
        assign rout_off[s]         = l3_rin_off[C];
      end else begin : g_no
        assign tin_valid[s] = 1'b0;
        assign tin_blk[s]   = '0;
        assign rout_off[s]  = 1'b1;
      end
    end

    ilp_tile #(.SETS(TILE_SETS), .WAYS(TILE_WAYS), .NROUT(NCH)) u_tile (
      .clk, .rst_n,
      .srch(srch_le2), .srch_hit(hit_le2[p]), .hold_repl,
      .tin_valid, .tin_blk, .tin_off,
      .tout_valid(rt_tin_valid[p]), .tout_blk(rt_tin_blk[p]), .tout_off(rt_tin_off[p]),
      .rin_valid(rt_rout_valid[p]), .rin_blk(rt_rout_blk), .rin_off(rt_rout_off[p]),
      .rout_valid, .rout_blk, .rout_off,
      .ev_valid(ev_valid_unused), .ev_blk(ev_blk_unused)
    );
  end

  // ---------------- level 3 ----------------
  for (genvar k = 0; k < N_LE3; k++) begin : g_le3
    logic [T_IN-1:0] tin_off_unused, rout_valid_unused;
    blk_t            tin_blk [T_IN];
    blk_t            rout_blk_unused;
    for (genvar s = 0; s < T_IN; s++) begin : g_z
      assign tin_blk[s] = '0;
    end

    ilp_tile #(.SETS(TILE_SETS), .WAYS(TILE_WAYS), .NROUT(0)) u_tile (
      .clk, .rst_n,
      .srch(srch_le3), .srch_hit(hit_le3[k]), .hold_repl,
      .tin_valid('0), .tin_blk, .tin_off(tin_off_unused),
      .tout_valid(l3_tout_valid[k]), .tout_blk(l3_tout_blk[k]), .tout_off(l3_tout_off[k]),
      .rin_valid(l3_rin_valid[k]), .rin_blk(l3_rin_blk[k]), .rin_off(l3_rin_off[k]),
      .rout_valid(rout_valid_unused), .rout_blk(rout_blk_unused), .rout_off('1),
      .ev_valid(ev_valid[k]), .ev_blk(ev_blk[k])
    );
  end
endmodule
