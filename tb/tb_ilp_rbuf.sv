// tb_ilp_rbuf: self-checking test of the replacement buffer.
// Checks that victims are stored and shown for placement, that off rises when both
// slots are taken, that a search finds a stored victim and returns its data, and that
// a search with extraction removes exactly that victim.
module tb_ilp_rbuf;
  import ilp_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a real falling edge: the asynchronous reset acts before the first clock
  always #5 clk = ~clk;

  logic   in_valid = 0, off, srch_extract = 0, srch_hit, out_valid, out_pop = 0;
  blk_t   in_blk = '0, out_blk;
  baddr_t srch_addr = '0;
  bdata_t srch_data;
  int checks = 0, failures = 0;

  ilp_rbuf dut (.*);

  function automatic blk_t mk(int unsigned n);
    blk_t b; b.addr = baddr_t'(n); b.data = {8{n * 32'h7F4A_7C15}}; return b;
  endfunction
  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask
  task automatic push(int unsigned n);
    in_valid = 1; in_blk = mk(n); @(negedge clk); in_valid = 0;
  endtask

  blk_t model[$];

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(!off && !out_valid, "empty");
    push(10);
    chk(out_valid && out_blk == mk(10) && !off, "one victim");
    push(20);
    chk(off, "off when full");
    srch_addr = baddr_t'(20); #1;
    chk(srch_hit && srch_data == mk(20).data, "search finds victim");
    srch_addr = baddr_t'(30); #1;
    chk(!srch_hit, "search misses absent block");
    srch_addr = baddr_t'(10); srch_extract = 1; #1;
    chk(srch_hit && srch_data == mk(10).data, "search finds first victim");
    @(negedge clk);
    srch_extract = 0;
    chk(!off && out_valid && out_blk == mk(20), "extracted victim gone");
    out_pop = 1; @(negedge clk); out_pop = 0;
    chk(!out_valid, "placed victim gone");
    // random against a model; every pushed block address is new
    for (int i = 0; i < 3000; i++) begin
      automatic int unsigned n = (i > 3) ? $urandom_range(i - 3, i) : i;
      automatic bit found = 0;
      blk_t po;
      bit pv, ex, pu;
      chk(off == (model.size() == 2), "random off");
      chk(out_valid == (model.size() != 0), "random valid");
      srch_addr = baddr_t'(1000 + n);
      srch_extract = $urandom_range(0, 1);
      #1;
      foreach (model[j]) if (model[j].addr == srch_addr) found = 1;
      chk(srch_hit == found, "random search");
      if (found) chk(srch_data == mk(1000 + n).data, "random search data");
      if (out_valid) begin
        found = 0;
        foreach (model[j]) if (model[j] == out_blk) found = 1;
        chk(found, "random out is stored");
      end
      out_pop  = $urandom_range(0, 2) == 0 && !(srch_hit && srch_extract);
      in_valid = !off && $urandom_range(0, 1);
      in_blk   = mk(1000 + i + 1);
      po = out_blk; pv = out_valid && out_pop; ex = srch_hit && srch_extract; pu = in_valid;
      @(negedge clk);
      if (ex) foreach (model[j]) if (model[j].addr == baddr_t'(1000 + n)) begin model.delete(j); break; end
      if (pv) foreach (model[j]) if (model[j] == po) begin model.delete(j); break; end
      if (pu) model.push_back(mk(1000 + i + 1));
      in_valid = 0; out_pop = 0; srch_extract = 0;
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
