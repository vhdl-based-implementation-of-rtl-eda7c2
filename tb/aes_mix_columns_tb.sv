// aes_mix_columns_tb: self-checking testbench for aes_mix_columns.
// Applies the worked example (ffeeddcc_bbaa9988_77665544_33221100 gives
// 77665544_38291a0b_ffeeddcc_b0a19283), the FIPS-197 round-1 column d4bf5d30
// -> 046681e5, and random states checked against a matrix product over
// GF(2^8).
// A free-running clock only paces the checks and the watchdog.
module aes_mix_columns_tb;
  import aes_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [127:0] x, y;

  aes_mix_columns dut (.state_i(x), .state_o(y));

  task automatic expect_eq(logic [127:0] got, logic [127:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: in %h got %h expected %h", what, x, got, exp);
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
    x = 128'hffeeddccbbaa99887766554433221100; @(posedge clk);
    expect_eq(y, 128'h7766554438291a0bffeeddccb0a19283, "example");
    x = 128'hd4000000bf0000005d00000030000000; @(posedge clk);
    expect_eq(y, 128'h040000006600000081000000e5000000, "FIPS-197 column");
    for (int i = 0; i < 300; i++) begin
      x = {$urandom, $urandom, $urandom, $urandom};
      @(posedge clk);
      expect_eq(y, ref_mix_columns(x), "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
