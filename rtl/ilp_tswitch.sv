// ilp_tswitch: transport switch of a tile in the tree-based transport network.
//
// A tile of the tree has one transport output link towards the root tile and up to two
// input transport buffers from its child tiles. The switch connects one of its inputs to
// the output link per cycle: input 0 is the tile's own hit block (from the cache array or
// the replacement buffer), inputs 1..NIN-1 are the heads of the input transport buffers.
// Nothing moves while the buffer at the far end of the output link signals off.
//
// Arbitration (own choice): the local hit goes first, so an uncontended hit leaves the
// tile in the cycle of its lookup; the buffered inputs share the rest round-robin.
// The switch is combinational; the one register per hop is the receiving buffer.
module ilp_tswitch
  import ilp_pkg::*;
#(
  parameter int unsigned NIN = 1 + T_IN
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [NIN-1:0] in_valid,
  input  blk_t           in_blk [NIN],
  output logic [NIN-1:0] in_grant,
  output logic           out_valid,
  output blk_t           out_blk,
  input  logic           out_off
);
  localparam int unsigned PW = (NIN > 1) ? $clog2(NIN) : 1;

  logic [PW-1:0] rr_q;      // buffered input that has priority next
  logic [PW-1:0] sel;

  always_comb begin
    in_grant  = '0;
    sel       = '0;
    out_valid = 1'b0;
    if (!out_off) begin
      if (in_valid[0]) begin
        out_valid = 1'b1;
      end else begin
        // round-robin over inputs 1..NIN-1 starting at rr_q
        for (int k = NIN - 2; k >= 0; k--) begin
          automatic int unsigned i = 1 + ((int'(rr_q) - 1 + k) % (NIN - 1));
          if (in_valid[i]) begin
            out_valid = 1'b1;
            sel       = PW'(i);
          end
        end
      end
    end
    if (out_valid) in_grant[sel] = 1'b1;
    out_blk = in_blk[sel];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rr_q <= PW'(1);
    else if (out_valid && sel != '0)
      rr_q <= (sel == PW'(NIN - 1)) ? PW'(1) : sel + 1'b1;
  end
endmodule
