// tb_ilp_repl_route: self-checking test of the replacement router.
// Checks round-robin distribution of victims over the outward neighbours, skipping of
// neighbours whose replacement buffer is off, and that ready is low only when every
// neighbour is off, against a model of the same policy.
module tb_ilp_repl_route;
  localparam int unsigned N = 5;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a real falling edge: the asynchronous reset acts before the first clock
  always #5 clk = ~clk;

  logic         req = 0, ready;
  logic [N-1:0] off = '0, sel;
  int checks = 0, failures = 0;

  ilp_repl_route #(.N(N)) dut (.*);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  int unsigned ptr = 0;
  int unsigned cnt[N] = '{default: 0};

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // all on: strict rotation 0,1,2,3,4,0
    for (int i = 0; i < 2 * N; i++) begin
      req = 1; #1;
      chk(ready && sel == N'(1 << (i % N)), "rotation");
      @(negedge clk);
    end
    ptr = 0;
    for (int i = 0; i < 4000; i++) begin
      automatic int exp = -1;
      req = $urandom_range(0, 1);
      off = N'($urandom_range(0, (1 << N) - 1));
      for (int k = N - 1; k >= 0; k--)
        if (!off[(ptr + k) % N]) exp = int'((ptr + k) % N);
      #1;
      chk(ready == (exp >= 0), "ready");
      chk(sel == ((req && exp >= 0) ? N'(1 << exp) : '0), "selection");
      if (req && exp >= 0) begin
        ptr = (exp + 1) % N;
        cnt[exp]++;
      end
      @(negedge clk);
    end
    for (int j = 0; j < N; j++) chk(cnt[j] > 100, "every neighbour used");
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
