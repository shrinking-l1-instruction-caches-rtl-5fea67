// tb_ilp_search_net: self-checking test of the search network.
// A search injected in cycle t must reach the level-2 tiles in cycle t+1 and the
// level-3 tiles in cycle t+2; hold_repl must be high exactly while level 2 is being
// searched; a search answered by any tile must not reach the next level, and one that
// no tile answers must appear on the next-level request port, in order, with its id.
module tb_ilp_search_net;
  import ilp_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a real falling edge: the asynchronous reset acts before the first clock
  always #5 clk = ~clk;

  search_t            inj = '0, srch_le2, srch_le3;
  logic [N_LE2-1:0]   hit_le2 = '0;
  logic [N_LE3-1:0]   hit_le3 = '0;
  logic               hold_repl, nl_req_valid, nl_req_ready = 0;
  logic [MSHR_W-1:0]  nl_req_id;
  baddr_t             nl_req_addr;
  int checks = 0, failures = 0;

  ilp_search_net dut (.*);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // per cycle: what was injected, and where it hits (0 none, 2 level 2, 3 level 3)
  search_t hist[$];
  int      where[$];
  search_t expq[$];
  int nmiss = 0;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < 3000; i++) begin
      automatic search_t s;
      automatic bit pop;
      s.valid = $urandom_range(0, 2) == 0 && expq.size() < 4;
      s.id    = MSHR_W'($urandom);
      s.addr  = baddr_t'($urandom);
      inj = s;
      hist.push_front(s);
      where.push_front($urandom_range(0, 2) == 0 ? 0 : $urandom_range(2, 3));
      // responses of the tiles to the searches now in flight
      hit_le2 = '0; hit_le3 = '0;
      if (hist.size() > 1 && hist[1].valid && where[1] == 2) hit_le2[$urandom_range(0, N_LE2 - 1)] = 1;
      if (hist.size() > 2 && hist[2].valid && where[2] == 3) hit_le3[$urandom_range(0, N_LE3 - 1)] = 1;
      nl_req_ready = $urandom_range(0, 1);
      #1;
      if (hist.size() > 1) begin
        chk(srch_le2 == hist[1], "level 2 sees the search one cycle later");
        chk(hold_repl == hist[1].valid, "hold while level 2 searched");
      end
      if (hist.size() > 2) chk(srch_le3 == hist[2], "level 3 sees the search two cycles later");
      chk(nl_req_valid == (expq.size() != 0), "next-level request valid");
      if (expq.size() != 0 && nl_req_valid)
        chk(nl_req_id == expq[0].id && nl_req_addr == expq[0].addr, "next-level request order");
      pop = nl_req_valid && nl_req_ready;
      @(negedge clk);
      if (pop) void'(expq.pop_front());
      if (hist.size() > 2 && hist[2].valid && where[2] == 0) begin expq.push_back(hist[2]); nmiss++; end
      if (hist.size() > 3) begin void'(hist.pop_back()); void'(where.pop_back()); end
    end
    chk(nmiss > 100, "global misses happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
