// ilp_repl_route: replacement network router.
//
// When the root tile or a tile displaces a block, the replacement network carries that
// victim one level further out, so recently evicted code stays close to the root tile.
// This router picks which of the N outward neighbours receives the next victim: it
// offers the victim to the neighbour after the one used last (round-robin) and skips
// neighbours whose replacement buffer signals off. `ready` tells the caller that the
// victim can leave this cycle; `sel` (one-hot) says where it goes when `req` is high.
// The source design uses an irregular replacement topology; the neighbour lists and
// the round-robin distribution used here are own choices.
module ilp_repl_route #(
  parameter int unsigned N = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         req,
  input  logic [N-1:0] off,
  output logic         ready,
  output logic [N-1:0] sel
);
  localparam int unsigned PW = (N > 1) ? $clog2(N) : 1;
  logic [PW-1:0] ptr_q, pick;

  always_comb begin
    ready = 1'b0;
    pick  = '0;
    for (int k = N - 1; k >= 0; k--) begin
      automatic int unsigned i = (int'(ptr_q) + k) % N;
      if (!off[i]) begin
        ready = 1'b1;
        pick  = PW'(i);
      end
    end
  end

  // kept apart from the search above: ready must not depend on req
  always_comb begin
    sel = '0;
    if (req && ready) sel[pick] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ptr_q <= '0;
    else if (req && ready) ptr_q <= (pick == PW'(N - 1)) ? '0 : pick + 1'b1;
  end
endmodule
