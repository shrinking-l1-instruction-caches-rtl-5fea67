// tb_ilp_nuca_cfg: the four root-tile sizes the design was evaluated with, side by side.
// The same four-thread traffic (private code loops of 30 to 90 blocks per thread,
// 240 in all, plus shared and scattered code) runs through iLP-NUCA with a 32 KB 4-way, 16 KB 2-way,
// 8 KB 2-way (default) and 4 KB 2-way root tile. Every answer is checked against data
// computed from its address. The test also checks that each configuration served
// blocks from the root tile, from the tiles and from the next level, and that a
// smaller root tile never has more root-tile hits than a larger one.
module tb_ilp_nuca_cfg;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a real falling edge: the asynchronous reset acts before the first clock
  always #5 clk = ~clk;
  logic go = 0;
  int checks = 0, failures = 0;
  localparam int NC = 4;
  int c_chk[NC], c_fail[NC], c_done[NC], c_rt[NC], c_tiles[NC], c_next[NC];

  ilp_cfg_harness #(.RT_SETS(256), .RT_WAYS(4), .SEED(7)) h32 (.clk, .rst_n, .go,
    .checks(c_chk[0]), .failures(c_fail[0]), .fetches(c_done[0]), .n_rt(c_rt[0]), .n_tiles(c_tiles[0]), .n_next(c_next[0]));
  ilp_cfg_harness #(.RT_SETS(256), .RT_WAYS(2), .SEED(7)) h16 (.clk, .rst_n, .go,
    .checks(c_chk[1]), .failures(c_fail[1]), .fetches(c_done[1]), .n_rt(c_rt[1]), .n_tiles(c_tiles[1]), .n_next(c_next[1]));
  ilp_cfg_harness #(.RT_SETS(128), .RT_WAYS(2), .SEED(7)) h8 (.clk, .rst_n, .go,
    .checks(c_chk[2]), .failures(c_fail[2]), .fetches(c_done[2]), .n_rt(c_rt[2]), .n_tiles(c_tiles[2]), .n_next(c_next[2]));
  ilp_cfg_harness #(.RT_SETS(64), .RT_WAYS(2), .SEED(7)) h4 (.clk, .rst_n, .go,
    .checks(c_chk[3]), .failures(c_fail[3]), .fetches(c_done[3]), .n_rt(c_rt[3]), .n_tiles(c_tiles[3]), .n_next(c_next[3]));

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  localparam string NAME[NC] = '{"32KB-4way", "16KB-2way", "8KB-2way", "4KB-2way"};

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    go = 1;
    repeat (40000) @(negedge clk);
    go = 0;
    repeat (100) @(negedge clk);
    for (int i = 0; i < NC; i++) begin
      $display("RT %s: fetches %0d, RT hits %0d, tile hits %0d, next-level fetches %0d, answer checks %0d failed %0d",
               NAME[i], c_done[i], c_rt[i], c_tiles[i], c_next[i], c_chk[i], c_fail[i]);
      checks += c_chk[i];
      failures += c_fail[i];
      chk(c_done[i] > 1000, "fetches made progress");
      chk(c_rt[i] > 0 && c_tiles[i] > 0 && c_next[i] > 0, "all three sources used");
    end
    chk(c_rt[1] * c_done[2] >= c_rt[2] * c_done[1], "16 KB hit share not below 8 KB");
    chk(c_rt[2] * c_done[3] >= c_rt[3] * c_done[2], "8 KB hit share not below 4 KB");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
