// tb_ilp_mshr: self-checking test of the root tile's miss status holding registers.
// Checks primary misses (inject with a free entry id), secondary misses to the same
// block (merged, no inject), the thread mask returned when the block comes back, the
// per-thread stall flags, and the full flag after eight distinct misses. A random part
// compares with a model.
module tb_ilp_mshr;
  import ilp_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a real falling edge: the asynchronous reset acts before the first clock
  always #5 clk = ~clk;

  logic              miss_valid = 0, inject, full, fill_valid = 0, fill_match;
  baddr_t            miss_addr = '0, fill_addr = '0;
  logic [TID_W-1:0]  miss_tid = '0;
  logic [MSHR_W-1:0] inject_id;
  tmask_t            fill_tmask, thread_wait;
  int checks = 0, failures = 0;

  ilp_mshr dut (.*);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  tmask_t mdl[baddr_t];    // outstanding block -> waiting threads

  task automatic miss(baddr_t a, int t);
    miss_valid = 1; miss_addr = a; miss_tid = TID_W'(t);
    #1;
    chk(inject == !mdl.exists(a), "inject only for primary miss");
    @(negedge clk);
    miss_valid = 0;
    if (mdl.exists(a)) mdl[a] |= tmask_t'(1 << t); else mdl[a] = tmask_t'(1 << t);
  endtask

  task automatic fill(baddr_t a);
    fill_valid = 1; fill_addr = a;
    #1;
    chk(fill_match == mdl.exists(a), "fill match");
    if (mdl.exists(a)) chk(fill_tmask == mdl[a], "fill thread mask");
    @(negedge clk);
    fill_valid = 0;
    if (mdl.exists(a)) mdl.delete(a);
  endtask

  function automatic tmask_t waiting();
    tmask_t w = '0;
    foreach (mdl[k]) w |= mdl[k];
    return w;
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(thread_wait == '0 && !full, "idle");
    miss(baddr_t'(100), 0);
    chk(thread_wait == 4'b0001, "thread 0 stalled");
    miss(baddr_t'(100), 2);                  // secondary
    miss(baddr_t'(200), 1);
    chk(thread_wait == 4'b0111, "threads 0-2 stalled");
    fill(baddr_t'(100));
    chk(thread_wait == 4'b0010, "threads 0 and 2 released together");
    fill(baddr_t'(200));
    for (int i = 0; i < MSHR_N; i++) miss(baddr_t'(300 + i), i % NTHREADS);
    chk(full, "full after eight primary misses");
    for (int i = 0; i < MSHR_N; i++) fill(baddr_t'(300 + i));
    chk(!full && thread_wait == '0, "all released");
    for (int i = 0; i < 3000; i++) begin
      automatic baddr_t a = baddr_t'($urandom_range(0, 11));
      if ($urandom_range(0, 1) && (mdl.size() < MSHR_N || mdl.exists(a)))
        miss(a, $urandom_range(0, NTHREADS - 1));
      else fill(a);
      chk(thread_wait == waiting(), "random thread_wait");
      chk(full == (mdl.size() == MSHR_N), "random full");
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
