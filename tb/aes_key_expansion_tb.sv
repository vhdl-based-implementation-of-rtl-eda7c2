// aes_key_expansion_tb: self-checking testbench for aes_key_expansion.
// Loads the FIPS-197 appendix A.1 key (transposed into the row-major
// layout) and checks round keys 1 and 10 against the standard's values,
// then every round key of that and of random keys on both read ports
// against the reference expansion. Checks that ready rises exactly NR+1
// clock edges after the edge that sampled load, and that a second load
// during an expansion restarts it with the new key.
module aes_key_expansion_tb;
  import aes_ref_pkg::*;

  localparam int NR = 10;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic         reset, load, ready;
  logic [127:0] key, rk_a, rk_b;
  logic [3:0]   idx_a, idx_b;

  aes_key_expansion #(.NR(NR)) dut (.*);

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // load key, count edges until ready
  task automatic expand(logic [127:0] k);
    int n = 0;
    key = k; load = 1'b1;
    @(posedge clk); #1 load = 1'b0;
    check(!ready, "ready low after load");
    while (!ready) begin @(posedge clk); #1 n++; end
    check(n == NR, $sformatf("ready %0d edges after the load edge, expected %0d", n + 1, NR + 1));
  endtask

  task automatic check_all(logic [127:0] k);
    for (int i = 0; i <= NR; i++) begin
      idx_a = 4'(i); idx_b = 4'(NR - i);
      #1;
      check(rk_a === ref_round_key(k, NR, i), $sformatf("port a round key %0d = %h", i, rk_a));
      check(rk_b === ref_round_key(k, NR, NR - i), $sformatf("port b round key %0d = %h", NR - i, rk_b));
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] k;
    reset = 1'b1; load = 1'b0; key = '0; idx_a = '0; idx_b = '0;
    repeat (3) @(posedge clk);
    #1 reset = 1'b0;
    check(!ready, "not ready after reset");

    k = transpose(128'h2b7e151628aed2a6abf7158809cf4f3c);
    expand(k);
    idx_a = 4'd1; idx_b = 4'd10; #1;
    check(rk_a === transpose(128'ha0fafe1788542cb123a339392a6c7605), "FIPS-197 round key 1");
    check(rk_b === transpose(128'hd014f9a8c9ee2589e13f0cc8b6630ca6), "FIPS-197 round key 10");
    idx_a = 4'd0; #1;
    check(rk_a === k, "round key 0 is the key");
    check_all(k);

    // restart in the middle of an expansion
    key = 128'h0123456789abcdef0011223344556677; load = 1'b1;
    @(posedge clk); #1 load = 1'b0;
    repeat (4) @(posedge clk);
    #1 k = {$urandom, $urandom, $urandom, $urandom};
    expand(k);
    check_all(k);

    for (int t = 0; t < 10; t++) begin
      k = {$urandom, $urandom, $urandom, $urandom};
      expand(k);
      check_all(k);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
