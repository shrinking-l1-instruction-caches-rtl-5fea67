// ilp_tbuf: transport buffer (Tbf) at the receiving end of one transport link.
//
// The transport network moves hit blocks towards the root tile with store-and-forward
// flow control and on/off back-pressure: the receiver raises `off` while it cannot take
// another block and the sender holds its block until `off` falls. Each link has a
// two-entry buffer. `off` is derived from the stored occupancy only (never from this
// cycle's pop), so it is a clean registered signal; with two entries a stream of blocks
// still moves one block per cycle.
//
// Interface: in_valid/in_blk push a whole block in one cycle (block-wide link, own
// choice); out_valid/out_blk show the oldest block; out_pop removes it. A block pushed
// in cycle t is visible at the output in cycle t+1 (one cycle per hop).
module ilp_tbuf
  import ilp_pkg::*;
#(
  parameter int unsigned DEPTH = TBF_DEPTH
) (
  input  logic clk,
  input  logic rst_n,
  // link side (upstream tile)
  input  logic in_valid,
  input  blk_t in_blk,
  output logic off,
  // switch / multiplexer side
  output logic out_valid,
  output blk_t out_blk,
  input  logic out_pop
);
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  blk_t            mem_q [DEPTH];
  logic [PW-1:0]   rd_q, wr_q;
  logic [PW:0]     cnt_q;

  logic push, pop;
  assign push      = in_valid && !off;
  assign pop       = out_pop && out_valid;
  assign off       = (cnt_q == (PW+1)'(DEPTH));
  assign out_valid = (cnt_q != '0);
  assign out_blk   = mem_q[rd_q];

  function automatic logic [PW-1:0] nxt(logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_q  <= '0;
      wr_q  <= '0;
      cnt_q <= '0;
    end else begin
      if (push) begin
        mem_q[wr_q] <= in_blk;
        wr_q        <= nxt(wr_q);
      end
      if (pop) rd_q <= nxt(rd_q);
      cnt_q <= cnt_q + (PW+1)'(push) - (PW+1)'(pop);
    end
  end

  // on/off rule: a sender never pushes into a buffer that signals off
  a_no_push_when_off: assert property (@(posedge clk) disable iff (!rst_n) !(in_valid && off))
    else $error("ilp_tbuf: block pushed while off");
endmodule
