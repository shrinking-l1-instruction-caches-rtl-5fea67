// tb_ilp_cache_array: self-checking test of the set-associative array.
// Checks lookup hit/miss and data, LRU victim choice (insertions and lookups that
// touch a line), extraction, and then a random test against a reference model of a
// 2-way true-LRU cache kept in the testbench.
module tb_ilp_cache_array;
  import ilp_pkg::*;
  localparam int unsigned SETS = 16, WAYS = 2;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a real falling edge: the asynchronous reset acts before the first clock
  always #5 clk = ~clk;

  baddr_t lk_addr = '0;
  logic   lk_touch = 0, lk_extract = 0, lk_hit, ins_en = 0, vic_valid;
  logic [0:0] lk_way;
  bdata_t lk_data;
  blk_t   ins_blk = '0, vic_blk;
  int checks = 0, failures = 0;

  ilp_cache_array #(.SETS(SETS), .WAYS(WAYS)) dut (.*);

  function automatic bdata_t dat(baddr_t a);
    return {8{a * 32'h9E37_79B9 + 32'h1234}};
  endfunction
  function automatic blk_t mk(baddr_t a);
    blk_t b; b.addr = a; b.data = dat(a); return b;
  endfunction
  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // reference model: per set, list of addresses, index 0 = most recent
  baddr_t mdl[SETS][$];

  task automatic do_insert(baddr_t a);
    int s = int'(a % SETS);
    ins_en = 1; ins_blk = mk(a);
    #1;
    chk(vic_valid == (mdl[s].size() == WAYS), "victim valid");
    if (mdl[s].size() == WAYS) chk(vic_blk == mk(mdl[s][WAYS-1]), "victim is LRU");
    @(negedge clk);
    ins_en = 0;
    if (mdl[s].size() == WAYS) void'(mdl[s].pop_back());
    mdl[s].push_front(a);
  endtask

  task automatic do_lookup(baddr_t a, bit touch, bit extract);
    int s = int'(a % SETS);
    int pos = -1;
    foreach (mdl[s][i]) if (mdl[s][i] == a) pos = i;
    lk_addr = a; lk_touch = touch; lk_extract = extract;
    #1;
    chk(lk_hit == (pos >= 0), "hit flag");
    if (pos >= 0) chk(lk_data == dat(a), "hit data");
    @(negedge clk);
    lk_touch = 0; lk_extract = 0;
    if (pos >= 0 && extract) mdl[s].delete(pos);
    else if (pos >= 0 && touch) begin mdl[s].delete(pos); mdl[s].push_front(a); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    do_lookup(baddr_t'(3), 0, 0);           // cold miss
    do_insert(baddr_t'(3));
    do_insert(baddr_t'(3 + SETS));
    do_lookup(baddr_t'(3), 1, 0);           // touch: 3+SETS becomes LRU
    do_insert(baddr_t'(3 + 2 * SETS));      // displaces 3+SETS
    do_lookup(baddr_t'(3 + SETS), 0, 0);
    do_lookup(baddr_t'(3), 0, 1);           // extract
    do_lookup(baddr_t'(3), 0, 0);
    do_insert(baddr_t'(3 + 5 * SETS));      // fills the freed way, no victim
    for (int i = 0; i < 3000; i++) begin
      automatic baddr_t a = baddr_t'($urandom_range(0, 4 * SETS - 1));
      automatic int s = int'(a % SETS);
      automatic bit present = 0;
      foreach (mdl[s][j]) if (mdl[s][j] == a) present = 1;
      if (!present && $urandom_range(0, 1)) do_insert(a);
      else do_lookup(a, $urandom_range(0, 1), $urandom_range(0, 3) == 0);
    end
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
