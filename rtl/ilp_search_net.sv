// ilp_search_net: search network of iLP-NUCA.
//
// A miss in the root tile is injected here (inj) and broadcast, without buffering or
// flow control, one level per cycle: every Le2 tile looks the block up in the cycle
// after injection (srch_le2) and every Le3 tile one cycle later (srch_le3). Since a
// broadcast reaches all tiles of a level in the same cycle, one register per level
// stands for the registers of the broadcast tree. The hits the tiles report are
// collected along the way; a search that no tile of either level answered is a miss of
// the whole structure and is queued towards the next cache level (nl_req_*).
// hold_repl is high while Le2 tiles are being searched, so that no victim moves from an
// Le2 tile to an Le3 tile between the two lookups of one search (the block would
// otherwise be found twice, or not at all).
// From the source design: broadcast, bufferless, one cycle per level, miss requests only.
// Own choices: the miss queue to the next level and the hold_repl rule.
module ilp_search_net
  import ilp_pkg::*;
#(
  parameter int unsigned NQ = MSHR_N    // next-level miss queue depth
) (
  input  logic               clk,
  input  logic               rst_n,
  input  search_t            inj,
  output search_t            srch_le2,
  input  logic [N_LE2-1:0]   hit_le2,
  output search_t            srch_le3,
  input  logic [N_LE3-1:0]   hit_le3,
  output logic               hold_repl,
  output logic               nl_req_valid,
  output logic [MSHR_W-1:0]  nl_req_id,
  output baddr_t             nl_req_addr,
  input  logic               nl_req_ready
);
  localparam int unsigned QW = (NQ > 1) ? $clog2(NQ) : 1;

  search_t s1_q, s2_q;
  logic    s2_hit_q;

  assign srch_le2  = s1_q;
  assign srch_le3  = s2_q;
  assign hold_repl = s1_q.valid;

  logic global_miss;
  assign global_miss = s2_q.valid && !s2_hit_q && (hit_le3 == '0);

  // next-level miss queue
  search_t         q_q [NQ];
  logic [QW-1:0]   q_rd_q, q_wr_q;
  logic [QW:0]     q_cnt_q;
  logic            q_pop;

  assign nl_req_valid = (q_cnt_q != '0);
  assign nl_req_id    = q_q[q_rd_q].id;
  assign nl_req_addr  = q_q[q_rd_q].addr;
  assign q_pop        = nl_req_valid && nl_req_ready;

  function automatic logic [QW-1:0] nxt(logic [QW-1:0] p);
    return (p == QW'(NQ - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_q     <= '0;
      s2_q     <= '0;
      s2_hit_q <= 1'b0;
      q_rd_q   <= '0;
      q_wr_q   <= '0;
      q_cnt_q  <= '0;
    end else begin
      s1_q     <= inj;
      s2_q     <= s1_q;
      s2_hit_q <= s1_q.valid && (hit_le2 != '0);
      if (global_miss) begin
        q_q[q_wr_q] <= s2_q;
        q_wr_q      <= nxt(q_wr_q);
      end
      if (q_pop) q_rd_q <= nxt(q_rd_q);
      q_cnt_q <= q_cnt_q + (QW+1)'(global_miss) - (QW+1)'(q_pop);
    end
  end

  a_one_hit_le2: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(hit_le2))
    else $error("ilp_search_net: several Le2 tiles hit");
  a_one_hit_le3: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(hit_le3))
    else $error("ilp_search_net: several Le3 tiles hit");
  a_no_double: assert property (@(posedge clk) disable iff (!rst_n)
    !(s2_q.valid && s2_hit_q && hit_le3 != '0))
    else $error("ilp_search_net: block found in two levels");
  a_queue_room: assert property (@(posedge clk) disable iff (!rst_n)
    !(global_miss && !q_pop && q_cnt_q == (QW+1)'(NQ)))
    else $error("ilp_search_net: next-level miss queue overflow");
endmodule
