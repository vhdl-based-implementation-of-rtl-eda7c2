// aes_add_round_key_tb: self-checking testbench for aes_add_round_key.
// Applies the worked example (ffeeddcc_bbaa9988_77665544_33221100 with
// round key 55ee76cc_bbaa9988_33665544_33221100 gives
// aa00ab00_00000000_44000000_00000000) and random pairs checked against
// a byte-by-byte XOR. A free-running clock paces checks and watchdog.
module aes_add_round_key_tb;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [127:0] x, k, y, e;

  aes_add_round_key dut (.state_i(x), .w(k), .state_o(y));

  task automatic expect_eq(logic [127:0] exp, string what);
    checks++;
    if (y !== exp) begin
      failures++;
      $display("FAIL %s: %h ^ %h got %h expected %h", what, x, k, y, exp);
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
    x = 128'hffeeddccbbaa99887766554433221100;
    k = 128'h55ee76ccbbaa99883366554433221100;
    @(posedge clk);
    expect_eq(128'haa00ab00000000004400000000000000, "example");
    for (int i = 0; i < 300; i++) begin
      x = {$urandom, $urandom, $urandom, $urandom};
      k = {$urandom, $urandom, $urandom, $urandom};
      @(posedge clk);
      for (int n = 0; n < 16; n++) e[8*n +: 8] = x[8*n +: 8] ^ k[8*n +: 8];
      expect_eq(e, "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
