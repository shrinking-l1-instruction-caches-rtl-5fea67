// ilp_tile: one cache tile of level 2 or 3 of iLP-NUCA.
//
// A tile holds a 32 KB 2-way slice of the second-level instruction cache and takes
// part in all three networks:
//   search      - when srch.valid is high this cycle, the block address is looked up in
//                 the cache array and in the replacement buffer at once (one-cycle tile
//                 access). A hit removes the block from the tile and raises srch_hit.
//   transport   - the hit block, or a block arriving in one of the two input transport
//                 buffers from the child tiles, is sent through the switch on the
//                 tile's single output link towards the root tile. An uncontended hit
//                 therefore reaches the parent's buffer at the end of its lookup cycle.
//                 Hits that cannot leave at once wait in a small local queue.
//   replacement - victim blocks arrive in the replacement buffer and are written into
//                 the array when the tile is not searching and hold_repl is low; the
//                 block they displace moves on to a child tile's replacement buffer
//                 (round-robin, NROUT children) or, in the last level (NROUT = 0),
//                 leaves on ev_valid/ev_blk towards the next cache level.
// From the source design: tile size and associativity, block size, one transport output
// link, two input transport buffers of two entries, on/off back-pressure, and searching
// the replacement buffer. Own choices: the local hit queue, its depth (one entry per
// thread, the most misses that can be in flight), arbitration and placement order.
module ilp_tile
  import ilp_pkg::*;
#(
  parameter int unsigned SETS  = 512,   // 32 KB / 32 B / 2 ways
  parameter int unsigned WAYS  = 2,
  parameter int unsigned NROUT = 2      // replacement children; 0 = last level
) (
  input  logic              clk,
  input  logic              rst_n,
  // search network
  input  search_t           srch,
  output logic              srch_hit,
  input  logic              hold_repl,
  // transport network: inputs from children
  input  logic [T_IN-1:0]   tin_valid,
  input  blk_t              tin_blk [T_IN],
  output logic [T_IN-1:0]   tin_off,
  // transport network: output towards the root tile
  output logic              tout_valid,
  output blk_t              tout_blk,
  input  logic              tout_off,
  // replacement network: input from the parent
  input  logic              rin_valid,
  input  blk_t              rin_blk,
  output logic              rin_off,
  // replacement network: outputs to the children
  output logic [T_IN-1:0]   rout_valid,
  output blk_t              rout_blk,
  input  logic [T_IN-1:0]   rout_off,
  // victims leaving the last level
  output logic              ev_valid,
  output blk_t              ev_blk
);
  localparam int unsigned LQ_N = NTHREADS;
  localparam int unsigned LQ_W = $clog2(LQ_N);

  // ---------------- cache array and replacement buffer ----------------
  logic   arr_hit, rbf_hit, ins_en, vic_valid;
  logic [$clog2(WAYS)-1:0] arr_way;
  bdata_t arr_data, rbf_data;
  blk_t   vic_blk, rbf_out_blk;
  logic   rbf_out_valid, rbf_pop;

  ilp_cache_array #(.SETS(SETS), .WAYS(WAYS)) u_array (
    .clk, .rst_n,
    .lk_addr(srch.addr), .lk_touch(1'b0), .lk_extract(srch.valid),
    .lk_hit(arr_hit), .lk_way(arr_way), .lk_data(arr_data),
    .ins_en, .ins_blk(rbf_out_blk), .vic_valid, .vic_blk
  );

  ilp_rbuf u_rbf (
    .clk, .rst_n,
    .in_valid(rin_valid), .in_blk(rin_blk), .off(rin_off),
    .srch_addr(srch.addr), .srch_extract(srch.valid),
    .srch_hit(rbf_hit), .srch_data(rbf_data),
    .out_valid(rbf_out_valid), .out_blk(rbf_out_blk), .out_pop(rbf_pop)
  );

  logic hit_now;
  blk_t hit_blk;
  assign hit_now      = srch.valid && (arr_hit || rbf_hit);
  assign srch_hit     = hit_now;
  assign hit_blk.addr = srch.addr;
  assign hit_blk.data = arr_hit ? arr_data : rbf_data;

  // ---------------- replacement: drain the Rbf into the array ----------------
  logic          rt_ready;
  logic [T_IN-1:0] rt_sel, child_off;
  logic          drain_ok;

  for (genvar i = 0; i < T_IN; i++) begin : g_child_off
    if (i < NROUT) begin : g_used
      assign child_off[i] = rout_off[i];
    end else begin : g_absent
      assign child_off[i] = 1'b1;
    end
  end

  ilp_repl_route #(.N(T_IN)) u_route (
    .clk, .rst_n, .req(ins_en && vic_valid && NROUT != 0), .off(child_off),
    .ready(rt_ready), .sel(rt_sel)
  );

  assign drain_ok   = !vic_valid || (NROUT == 0) || rt_ready;
  assign ins_en     = rbf_out_valid && !srch.valid && !hold_repl && drain_ok;
  assign rbf_pop    = ins_en;
  assign rout_valid = rt_sel;
  assign rout_blk   = vic_blk;
  assign ev_valid   = ins_en && vic_valid && (NROUT == 0);
  assign ev_blk     = vic_blk;

  // ---------------- local hit queue (bypassed when empty) ----------------
  blk_t            lq_q [LQ_N];
  logic [LQ_W-1:0] lq_rd_q, lq_wr_q;
  logic [LQ_W:0]   lq_cnt_q;
  logic            lq_empty, loc_valid, loc_grant, lq_push, lq_pop;
  blk_t            loc_blk;

  assign lq_empty  = (lq_cnt_q == '0);
  assign loc_valid = !lq_empty || hit_now;
  assign loc_blk   = lq_empty ? hit_blk : lq_q[lq_rd_q];
  assign lq_pop    = loc_grant && !lq_empty;
  assign lq_push   = hit_now && !(lq_empty && loc_grant);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lq_rd_q  <= '0;
      lq_wr_q  <= '0;
      lq_cnt_q <= '0;
    end else begin
      if (lq_push) begin
        lq_q[lq_wr_q] <= hit_blk;
        lq_wr_q       <= lq_wr_q + 1'b1;
      end
      if (lq_pop) lq_rd_q <= lq_rd_q + 1'b1;
      lq_cnt_q <= lq_cnt_q + (LQ_W+1)'(lq_push) - (LQ_W+1)'(lq_pop);
    end
  end

  // ---------------- transport: input buffers and switch ----------------
  logic [T_IN:0] sw_valid, sw_grant;
  blk_t          sw_blk [T_IN+1];

  assign sw_valid[0] = loc_valid;
  assign sw_blk[0]   = loc_blk;
  assign loc_grant   = sw_grant[0];

  for (genvar i = 0; i < T_IN; i++) begin : g_tbf
    ilp_tbuf u_tbf (
      .clk, .rst_n,
      .in_valid(tin_valid[i]), .in_blk(tin_blk[i]), .off(tin_off[i]),
      .out_valid(sw_valid[i+1]), .out_blk(sw_blk[i+1]), .out_pop(sw_grant[i+1])
    );
  end

  ilp_tswitch #(.NIN(T_IN + 1)) u_sw (
    .clk, .rst_n,
    .in_valid(sw_valid), .in_blk(sw_blk), .in_grant(sw_grant),
    .out_valid(tout_valid), .out_blk(tout_blk), .out_off(tout_off)
  );

  a_lq_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    !(lq_push && !lq_pop && lq_cnt_q == (LQ_W+1)'(LQ_N)))
    else $error("ilp_tile: local hit queue overflow");
  a_single_copy: assert property (@(posedge clk) disable iff (!rst_n)
    !(srch.valid && arr_hit && rbf_hit))
    else $error("ilp_tile: block found twice");
endmodule
