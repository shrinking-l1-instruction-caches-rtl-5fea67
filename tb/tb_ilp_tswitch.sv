// tb_ilp_tswitch: self-checking test of the tile transport switch.
// Checks that the local hit input always wins, that the buffered inputs are served
// round-robin, that nothing is granted while the output link is off, and that the
// output carries the granted input's block. A random part compares with a model of the
// same policy.
module tb_ilp_tswitch;
  import ilp_pkg::*;
  localparam int unsigned NIN = 3;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a real falling edge: the asynchronous reset acts before the first clock
  always #5 clk = ~clk;

  logic [NIN-1:0] in_valid = '0, in_grant;
  blk_t           in_blk [NIN];
  logic           out_valid, out_off = 0;
  blk_t           out_blk;
  int checks = 0, failures = 0;

  ilp_tswitch #(.NIN(NIN)) dut (.*);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  int unsigned rr = 1;   // model of the round-robin pointer
  int unsigned served[NIN] = '{default: 0};

  initial begin
    for (int i = 0; i < NIN; i++) in_blk[i] = '{addr: baddr_t'(i + 1), data: {8{32'(i * 77 + 5)}}};
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < 4000; i++) begin
      automatic int exp = -1;
      in_valid = NIN'($urandom_range(0, (1 << NIN) - 1));
      out_off  = $urandom_range(0, 4) == 0;
      if (!out_off) begin
        if (in_valid[0]) exp = 0;
        else
          for (int k = NIN - 2; k >= 0; k--) begin
            automatic int unsigned c = 1 + ((rr - 1 + k) % (NIN - 1));
            if (in_valid[c]) exp = int'(c);
          end
      end
      #1;
      chk(out_valid == (exp >= 0), "output valid");
      if (exp >= 0) begin
        chk(in_grant == NIN'(1 << exp), "grant");
        chk(out_blk == in_blk[exp], "routed block");
        served[exp]++;
        if (exp != 0) rr = (exp == NIN - 1) ? 1 : exp + 1;
      end else chk(in_grant == '0, "no grant");
      @(negedge clk);
    end
    chk(served[1] > 300 && served[2] > 300, "both buffers served");
    // fairness: with both buffered inputs always valid and no local hit they alternate
    in_valid = 3'b110; out_off = 0;
    #1;
    begin
      automatic logic [NIN-1:0] g0 = in_grant;
      @(negedge clk); #1;
      chk(in_grant != g0 && in_grant != '0, "alternation");
    end
    @(negedge clk);
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
