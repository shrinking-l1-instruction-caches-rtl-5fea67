// ilp_rbuf: replacement buffer (Rbf) of a tile.
//
// Holds victim blocks that the replacement network has delivered to this tile and that
// wait to be written into the tile's cache array. Because such a block is still part of
// the cache contents, a search must look here too: srch_addr is compared with every
// entry in the same cycle, a match is reported on srch_hit/srch_data, and with
// srch_extract that entry is removed (the block leaves on the transport network).
//
// Interface: in_valid/in_blk push a block into a free slot, `off` is raised while every
// slot is taken (on/off back-pressure, as on the transport links). out_valid/out_blk
// present one stored block (lowest slot first) and out_pop removes it when the tile
// writes it into its array. Entries are slots, not a strict queue: the order in which
// victims are placed is an own choice. Two entries by default, like the link buffers.
module ilp_rbuf
  import ilp_pkg::*;
#(
  parameter int unsigned DEPTH = 2
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  blk_t   in_blk,
  output logic   off,
  input  baddr_t srch_addr,
  input  logic   srch_extract,
  output logic   srch_hit,
  output bdata_t srch_data,
  output logic   out_valid,
  output blk_t   out_blk,
  input  logic   out_pop
);
  localparam int unsigned SW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  blk_t             ent_q [DEPTH];
  logic [DEPTH-1:0] vld_q;

  logic [SW-1:0] hit_slot, out_slot, free_slot;
  logic          have_free;

  always_comb begin
    srch_hit  = 1'b0;
    hit_slot  = '0;
    out_valid = 1'b0;
    out_slot  = '0;
    have_free = 1'b0;
    free_slot = '0;
    for (int i = DEPTH - 1; i >= 0; i--) begin
      if (vld_q[i] && ent_q[i].addr == srch_addr) begin
        srch_hit = 1'b1;
        hit_slot = SW'(i);
      end
      if (vld_q[i]) begin
        out_valid = 1'b1;
        out_slot  = SW'(i);
      end else begin
        have_free = 1'b1;
        free_slot = SW'(i);
      end
    end
    srch_data = ent_q[hit_slot].data;
    out_blk   = ent_q[out_slot];
  end

  assign off = !have_free;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld_q <= '0;
    end else begin
      if (srch_hit && srch_extract) vld_q[hit_slot] <= 1'b0;
      if (out_valid && out_pop) vld_q[out_slot] <= 1'b0;
      if (in_valid && !off) begin
        vld_q[free_slot] <= 1'b1;
        ent_q[free_slot] <= in_blk;
      end
    end
  end

  a_no_push_when_off: assert property (@(posedge clk) disable iff (!rst_n) !(in_valid && off))
    else $error("ilp_rbuf: victim pushed while off");
endmodule
