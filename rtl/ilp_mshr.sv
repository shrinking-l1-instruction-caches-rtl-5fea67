// ilp_mshr: miss status holding registers of the root tile.
//
// One entry per block being fetched from the rest of iLP-NUCA. An entry holds the block
// address and a mask of the threads stalled on it. A fetch miss from thread t either
// joins the entry already waiting for the same block (secondary miss: no new search is
// sent) or takes a free entry (primary miss: `inject` is raised and the entry number is
// the search id). When the block comes back (fill_valid/fill_addr), the matching entry
// reports its thread mask on fill_tmask, in the same cycle, and is freed at the clock edge.
// thread_wait shows which threads have a miss outstanding; the root tile accepts no
// fetch from them, since a thread that misses in the first level is stalled.
// From the source design: 8 entries and up to 4 secondary misses per entry (with four
// threads and one outstanding fetch each, a thread mask can never exceed that).
// Own choices: the lowest free entry is taken; miss and fill may come in the same cycle
// but must not name the same block (the root tile forwards that case as a hit).
module ilp_mshr
  import ilp_pkg::*;
#(
  parameter int unsigned N = MSHR_N
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // new first-level miss
  input  logic                  miss_valid,
  input  baddr_t                miss_addr,
  input  logic [TID_W-1:0]      miss_tid,
  output logic                  inject,
  output logic [$clog2(N)-1:0]  inject_id,
  output logic                  full,
  // returning block
  input  logic                  fill_valid,
  input  baddr_t                fill_addr,
  output logic                  fill_match,
  output tmask_t                fill_tmask,
  // status
  output tmask_t                thread_wait
);
  localparam int unsigned IW = $clog2(N);

  logic [N-1:0] vld_q;
  baddr_t       addr_q  [N];
  tmask_t       tmask_q [N];

  logic          m_hit, have_free;
  logic [IW-1:0] m_idx, f_idx, free_idx;

  always_comb begin
    m_hit       = 1'b0;
    m_idx       = '0;
    fill_match  = 1'b0;
    f_idx       = '0;
    have_free   = 1'b0;
    free_idx    = '0;
    thread_wait = '0;
    for (int i = N - 1; i >= 0; i--) begin
      if (vld_q[i] && addr_q[i] == miss_addr) begin
        m_hit = 1'b1;
        m_idx = IW'(i);
      end
      if (vld_q[i] && addr_q[i] == fill_addr) begin
        fill_match = fill_valid;
        f_idx      = IW'(i);
      end
      if (!vld_q[i]) begin
        have_free = 1'b1;
        free_idx  = IW'(i);
      end
      if (vld_q[i]) thread_wait |= tmask_q[i];
    end
    fill_tmask = fill_match ? tmask_q[f_idx] : '0;
    full       = !have_free;
    inject     = miss_valid && !m_hit && have_free;
    inject_id  = free_idx;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld_q <= '0;
    end else begin
      if (fill_match) vld_q[f_idx] <= 1'b0;
      if (miss_valid && m_hit)
        tmask_q[m_idx] <= tmask_q[m_idx] | (tmask_t'(1) << miss_tid);
      else if (inject) begin
        vld_q[free_idx]   <= 1'b1;
        addr_q[free_idx]  <= miss_addr;
        tmask_q[free_idx] <= tmask_t'(1) << miss_tid;
      end
    end
  end

  a_no_lost_miss: assert property (@(posedge clk) disable iff (!rst_n)
    !(miss_valid && !m_hit && !have_free))
    else $error("ilp_mshr: miss with no free entry");
  a_no_miss_on_fill: assert property (@(posedge clk) disable iff (!rst_n)
    !(miss_valid && fill_valid && miss_addr == fill_addr))
    else $error("ilp_mshr: miss for the block being filled");
endmodule
