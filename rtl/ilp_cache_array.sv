// ilp_cache_array: set-associative tag/data array shared by the root tile and the tiles.
//
// Holds SETS x WAYS blocks of 32 bytes with a valid bit, a tag and a true-LRU age per
// line. Three operations, all usable in the same cycle:
//   lookup  (combinational): lk_addr -> lk_hit, lk_way, lk_data. With lk_touch the hit
//           line becomes most recently used; with lk_extract it is invalidated (a tile
//           hands a hit block to the transport network and keeps no copy).
//   insert  : ins_en writes ins_blk into an invalid way, else into the LRU way, and
//           makes it most recently used. vic_valid/vic_blk show, combinationally, the
//           block that ins_blk would displace, so the caller can first make sure the
//           replacement network has room for it. The victim's set-index bits are
//           those of ins_blk, since both belong to the same set.
// Reads are asynchronous; all updates take effect at the next clock edge. When an
// insert and a touch hit the same set in one cycle the insert's age update wins.
// Sizes follow the source design (32 KB 2-way tiles, 8 KB 2-way RT); the LRU policy and
// the age encoding are own choices.
module ilp_cache_array
  import ilp_pkg::*;
#(
  parameter int unsigned SETS = 512,
  parameter int unsigned WAYS = 2
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // lookup
  input  baddr_t                  lk_addr,
  input  logic                    lk_touch,
  input  logic                    lk_extract,
  output logic                    lk_hit,
  output logic [$clog2(WAYS)-1:0] lk_way,
  output bdata_t                  lk_data,
  // insert
  input  logic                    ins_en,
  input  blk_t                    ins_blk,
  output logic                    vic_valid,
  output blk_t                    vic_blk
);
  localparam int unsigned IDX_W = $clog2(SETS);
  localparam int unsigned TAG_W = BADDR_W - IDX_W;
  localparam int unsigned WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1;

  typedef logic [TAG_W-1:0] tag_t;
  typedef logic [IDX_W-1:0] idx_t;

  bdata_t           data_q  [SETS][WAYS];
  tag_t             tag_q   [SETS][WAYS];
  logic [WAYS-1:0]  valid_q [SETS];
  logic [WAY_W-1:0] age_q   [SETS][WAYS];   // 0 = most recently used

  idx_t lk_idx, ins_idx;
  tag_t lk_tag, ins_tag;
  assign lk_idx  = lk_addr[IDX_W-1:0];
  assign lk_tag  = lk_addr[BADDR_W-1:IDX_W];
  assign ins_idx = ins_blk.addr[IDX_W-1:0];
  assign ins_tag = ins_blk.addr[BADDR_W-1:IDX_W];

  // lookup
  always_comb begin
    lk_hit  = 1'b0;
    lk_way  = '0;
    for (int unsigned w = 0; w < WAYS; w++)
      if (valid_q[lk_idx][w] && tag_q[lk_idx][w] == lk_tag) begin
        lk_hit = 1'b1;
        lk_way = w[$clog2(WAYS)-1:0];
      end
    lk_data = data_q[lk_idx][lk_way];
  end

  // victim choice for an insert: first invalid way, else the oldest way
  logic [WAY_W-1:0] ins_way;
  logic             ins_free;
  always_comb begin
    ins_free = 1'b0;
    ins_way  = '0;
    for (int unsigned w = 0; w < WAYS; w++)
      if (age_q[ins_idx][w] == WAY_W'(WAYS - 1)) ins_way = WAY_W'(w);
    for (int w = WAYS - 1; w >= 0; w--)
      if (!valid_q[ins_idx][w]) begin
        ins_free = 1'b1;
        ins_way  = WAY_W'(w);
      end
    vic_valid    = !ins_free;
    vic_blk.addr = {tag_q[ins_idx][ins_way], ins_idx};
    vic_blk.data = data_q[ins_idx][ins_way];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned s = 0; s < SETS; s++) begin
        valid_q[s] <= '0;
        for (int unsigned w = 0; w < WAYS; w++) age_q[s][w] <= WAY_W'(w);
      end
    end else begin
      if (lk_hit && lk_extract) valid_q[lk_idx][lk_way] <= 1'b0;
      if (lk_hit && lk_touch && !(ins_en && ins_idx == lk_idx))
        for (int unsigned w = 0; w < WAYS; w++)
          if (WAY_W'(w) == WAY_W'(lk_way)) age_q[lk_idx][w] <= '0;
          else if (age_q[lk_idx][w] < age_q[lk_idx][lk_way]) age_q[lk_idx][w] <= age_q[lk_idx][w] + 1'b1;
      if (ins_en) begin
        valid_q[ins_idx][ins_way] <= 1'b1;
        tag_q[ins_idx][ins_way]   <= ins_tag;
        data_q[ins_idx][ins_way]  <= ins_blk.data;
        for (int unsigned w = 0; w < WAYS; w++)
          if (WAY_W'(w) == ins_way) age_q[ins_idx][w] <= '0;
          else if (age_q[ins_idx][w] < age_q[ins_idx][ins_way]) age_q[ins_idx][w] <= age_q[ins_idx][w] + 1'b1;
      end
    end
  end
endmodule
