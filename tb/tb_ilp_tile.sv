// tb_ilp_tile: self-checking test of a cache tile.
// Instance a is a level-2 tile with two replacement children, instance b a level-3 tile.
// Checks: victims delivered on the replacement input are written into the array, a
// search hit leaves on the transport output in the lookup cycle and removes the block,
// a block still in the replacement buffer is found by a search, placement waits while
// hold_repl is high, the displaced block goes to the children in turn (or out of the
// last level), blocks from the input transport buffers take one cycle per hop, the
// output waits while the parent's buffer is off and the input buffers then signal off,
// and a hit that cannot leave at once is delivered later. A random phase then mixes
// victims, searches, hold_repl, transport inputs and back-pressure on both outputs and
// compares every search and every block leaving the tile with a model of its content.
module tb_ilp_tile;
  import ilp_pkg::*;
  localparam int unsigned SETS = 16;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a real falling edge: the asynchronous reset acts before the first clock
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  // instance a
  search_t         srch = '0;
  logic            srch_hit, hold_repl = 0;
  logic [T_IN-1:0] tin_valid = '0, tin_off, rout_valid, rout_off = '0;
  blk_t            tin_blk [T_IN];
  logic            tout_valid, tout_off = 0, rin_valid = 0, rin_off, ev_valid;
  blk_t            tout_blk, rin_blk = '0, rout_blk, ev_blk;

  ilp_tile #(.SETS(SETS), .NROUT(2)) a (.*);

  // instance b (last level)
  search_t         srch_b = '0;
  logic            hit_b, rin_valid_b = 0, rin_off_b, ev_valid_b, tout_valid_b;
  logic [T_IN-1:0] tin_off_b, rout_valid_b;
  blk_t            rin_blk_b = '0, ev_blk_b, tout_blk_b, rout_blk_b;
  blk_t            zero_in [T_IN];

  ilp_tile #(.SETS(SETS), .NROUT(0)) b (
    .clk, .rst_n, .srch(srch_b), .srch_hit(hit_b), .hold_repl(1'b0),
    .tin_valid('0), .tin_blk(zero_in), .tin_off(tin_off_b),
    .tout_valid(tout_valid_b), .tout_blk(tout_blk_b), .tout_off(1'b0),
    .rin_valid(rin_valid_b), .rin_blk(rin_blk_b), .rin_off(rin_off_b),
    .rout_valid(rout_valid_b), .rout_blk(rout_blk_b), .rout_off('1),
    .ev_valid(ev_valid_b), .ev_blk(ev_blk_b)
  );

  function automatic blk_t mk(int unsigned n);
    blk_t r; r.addr = baddr_t'(n); r.data = {8{n * 32'h2545_F491 + 32'd7}}; return r;
  endfunction
  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask
  task automatic victim(int unsigned n);
    rin_valid = 1; rin_blk = mk(n); @(negedge clk); rin_valid = 0;
  endtask
  task automatic search(int unsigned n, bit expect_hit);
    srch = '{valid: 1'b1, id: '0, addr: baddr_t'(n)};
    #1;
    chk(srch_hit == expect_hit, "search hit flag");
    if (expect_hit && !tout_off) chk(tout_valid && tout_blk == mk(n), "hit leaves in lookup cycle");
    @(negedge clk);
    srch = '0;
  endtask

  int rout_seen[T_IN] = '{default: 0};

  initial begin
    for (int i = 0; i < T_IN; i++) begin tin_blk[i] = '0; zero_in[i] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // placement and hit
    victim(5);
    chk(!rin_off, "buffer has room");
    @(negedge clk);                 // drained into the array
    search(5, 1);
    search(5, 0);                   // removed by the hit
    // hit in the replacement buffer while placement is held
    hold_repl = 1;
    victim(6);
    victim(7);
    chk(rin_off, "replacement buffer full, off");
    @(negedge clk);
    chk(rin_off, "nothing placed while held");
    search(7, 1);
    hold_repl = 0;
    @(negedge clk);
    @(negedge clk);
    search(6, 1);
    // displaced blocks go to the children in turn
    for (int i = 0; i < 6; i++) begin
      victim(1 + SETS * i);
      #1;
      @(negedge clk);
    end
    chk(rout_seen[0] == 2 && rout_seen[1] == 2, "victims alternate over the children");
    // a child that is off is skipped
    rout_off = 2'b01;
    victim(1 + SETS * 6);
    @(negedge clk);
    chk(rout_seen[1] == 3 && rout_seen[0] == 2, "off child skipped");
    rout_off = 2'b11;
    victim(1 + SETS * 7);
    @(negedge clk);
    chk(rin_off == 1'b0 || rin_off == 1'b1, "waiting victim");
    chk(rout_seen[0] == 2 && rout_seen[1] == 3, "no victim while both children off");
    rout_off = 2'b00;
    @(negedge clk);
    chk(rout_seen[0] == 3, "victim sent once a child is on");
    // transport: one cycle per hop
    tin_valid = 2'b10; tin_blk[1] = mk(900);
    @(negedge clk);
    tin_valid = '0;
    chk(tout_valid && tout_blk == mk(900), "forwarded block after one cycle");
    @(negedge clk);
    chk(!tout_valid, "forwarded once");
    // back-pressure from the parent
    tout_off = 1;
    tin_valid = 2'b01; tin_blk[0] = mk(901);
    @(negedge clk);
    tin_blk[0] = mk(902);
    @(negedge clk);
    tin_valid = '0;
    chk(tin_off[0], "input buffer off after two blocks while output blocked");
    chk(!tout_valid, "nothing leaves while parent off");
    // a hit while blocked waits in the local queue and goes first afterwards
    victim(33);
    @(negedge clk);
    search(33, 1);
    tout_off = 0;
    #1;
    chk(tout_valid && tout_blk == mk(33), "queued hit goes first");
    @(negedge clk); #1;
    chk(tout_valid && tout_blk == mk(901), "then buffered block");
    @(negedge clk); #1;
    chk(tout_valid && tout_blk == mk(902), "then second buffered block");
    @(negedge clk);
    // last level: displaced blocks leave the structure
    for (int i = 0; i < 3; i++) begin
      rin_valid_b = 1; rin_blk_b = mk(2 + SETS * i);
      @(negedge clk);
      rin_valid_b = 0;
      @(negedge clk);
    end
    chk(ev_seen == 1 && ev_last == mk(2), "last level evicts the oldest block");
    srch_b = '{valid: 1'b1, id: '0, addr: baddr_t'(2 + SETS)};
    #1;
    chk(hit_b && tout_valid_b && tout_blk_b == mk(2 + SETS), "last level hit");
    @(negedge clk);
    srch_b = '0;
    // random phase on instance a, checked against a model of the tile's content
    rout_off = '0; tout_off = 0; hold_repl = 0;
    repeat (4) @(negedge clk);
    held.delete();
    foreach (expect_out[k]) expect_out.delete(k);
    rnd_on = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      automatic int unsigned sa;
      @(negedge clk);
      srch = '0; rin_valid = 0; tin_valid = '0;
      tout_off  = ($urandom_range(0, 3) == 0);
      rout_off  = ($urandom_range(0, 3) == 0) ? T_IN'($urandom) : '0;
      hold_repl = ($urandom_range(0, 4) == 0);
      if (!rin_off && $urandom_range(0, 1) == 1) begin
        automatic int unsigned va = 20000 + $urandom_range(0, 63);
        if (!held.exists(va) && !expect_out.exists(va)) begin
          rin_valid = 1; rin_blk = mk(va);
        end
      end
      for (int i = 0; i < T_IN; i++)
        if (!tin_off[i] && $urandom_range(0, 5) == 0) begin
          tin_valid[i] = 1; tin_blk[i] = mk(5000 + tin_seq); tin_seq++;
        end
      sa = 20000 + $urandom_range(0, 63);
      if (hits_pending < 3 && $urandom_range(0, 2) == 0) srch = '{valid: 1'b1, id: '0, addr: baddr_t'(sa)};
      #1;
      if (srch.valid) chk(srch_hit == held.exists(sa), "random search agrees with the content model");
    end
    @(negedge clk);
    srch = '0; rin_valid = 0; tin_valid = '0; tout_off = 0; rout_off = '0; hold_repl = 0;
    repeat (20) @(negedge clk);
    chk(expect_out.size() == 0, "every hit and forwarded block left on the transport output");
    chk(rnd_hits > 50 && rnd_fwd > 50 && rnd_disp > 50, "random phase exercised hits, forwarding and displacement");
    $display("random phase: %0d hits, %0d forwarded, %0d displaced", rnd_hits, rnd_fwd, rnd_disp);
    rnd_on = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int   ev_seen = 0;
  blk_t ev_last;
  // content model for the random phase
  bit   held [int unsigned];
  bit   expect_out [int unsigned];
  bit   rnd_on = 0;
  int   hits_pending = 0, tin_seq = 0, rnd_hits = 0, rnd_fwd = 0, rnd_disp = 0;
  always @(posedge clk) if (rst_n && rnd_on) begin
    automatic int hp = hits_pending;
    if (rin_valid) held[int'(rin_blk.addr)] = 1;
    for (int i = 0; i < T_IN; i++)
      if (rout_valid[i]) begin
        rnd_disp++;
        if (rout_blk.addr >= 20000) chk(held.exists(int'(rout_blk.addr)), "displaced block was in the tile");
        held.delete(int'(rout_blk.addr));
      end
    if (srch.valid && srch_hit) begin
      rnd_hits++; hp++;
      held.delete(int'(srch.addr));
      expect_out[int'(srch.addr)] = 1;
    end
    for (int i = 0; i < T_IN; i++)
      if (tin_valid[i]) expect_out[int'(tin_blk[i].addr)] = 1;
    if (tout_valid && !tout_off) begin
      chk(expect_out.exists(int'(tout_blk.addr)) && tout_blk == mk(int'(tout_blk.addr)),
          "transport output carries an expected block");
      expect_out.delete(int'(tout_blk.addr));
      if (tout_blk.addr >= 20000) hp--; else rnd_fwd++;
    end
    hits_pending = hp;
  end

  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < T_IN; i++)
      if (rout_valid[i] && !rnd_on) begin
        rout_seen[i]++;
        if (rout_blk.addr % SETS != 1) begin
          failures++; $display("FAIL victim from wrong set");
        end
      end
    if (ev_valid_b) begin ev_seen++; ev_last = ev_blk_b; end
    if (ev_valid) begin failures++; $display("FAIL level-2 tile evicted out of the structure"); end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
