// tb_ilp_tbuf: self-checking test of the two-entry transport buffer.
// Directed part: a block pushed in one cycle is at the output the next cycle, the
// buffer signals off once it holds two blocks, and a push/pop stream moves one block
// per cycle. Random part: random pushes (only while on) and pops compared with a queue
// model for order, out_valid and off.
module tb_ilp_tbuf;
  import ilp_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a real falling edge: the asynchronous reset acts before the first clock
  always #5 clk = ~clk;

  logic in_valid = 0, off, out_valid, out_pop = 0;
  blk_t in_blk = '0, out_blk;
  int checks = 0, failures = 0;

  ilp_tbuf dut (.*);

  function automatic blk_t mk(int unsigned n);
    blk_t b;
    b.addr = baddr_t'(n);
    b.data = {8{n * 32'h9E37_79B9}};
    return b;
  endfunction

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  blk_t q[$];
  int unsigned pushed = 0, popped = 0;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(!off && !out_valid, "empty after reset");
    // push one block, visible next cycle
    in_valid = 1; in_blk = mk(1);
    @(negedge clk);
    in_valid = 0;
    chk(out_valid && out_blk == mk(1), "one-cycle hop");
    chk(!off, "on with one entry");
    in_valid = 1; in_blk = mk(2);
    @(negedge clk);
    in_valid = 0;
    chk(off, "off with two entries");
    out_pop = 1;
    @(negedge clk);
    out_pop = 0;
    chk(!off && out_blk == mk(2), "fifo order and on again");
    out_pop = 1;
    @(negedge clk);
    out_pop = 0;
    chk(!out_valid, "empty again");
    // stream: push every cycle, pop every cycle after the first
    for (int i = 0; i < 10; i++) begin
      in_valid = 1; in_blk = mk(100 + i);
      out_pop = (i > 0);
      if (i > 0) chk(out_blk == mk(99 + i), "stream order");
      chk(!off, "stream never off");
      @(negedge clk);
    end
    in_valid = 0; out_pop = 1;
    chk(out_blk == mk(109), "stream tail");
    @(negedge clk);
    out_pop = 0;
    chk(!out_valid, "stream drained");
    // random
    for (int i = 0; i < 2000; i++) begin
      chk(off == (q.size() == TBF_DEPTH), "random off");
      chk(out_valid == (q.size() != 0), "random valid");
      if (q.size() != 0) chk(out_blk == q[0], "random order");
      in_valid = !off && ($urandom_range(0, 2) != 0);
      in_blk   = mk(1000 + i);
      out_pop  = $urandom_range(0, 2) != 0;
      @(posedge clk);
      if (out_pop && q.size() != 0) begin void'(q.pop_front()); popped++; end
      if (in_valid) begin q.push_back(mk(1000 + i)); pushed++; end
      @(negedge clk);
    end
    chk(pushed > 500 && popped > 500, "random traffic moved");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
