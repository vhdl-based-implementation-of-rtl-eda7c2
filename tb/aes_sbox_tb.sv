// aes_sbox_tb: self-checking testbench for aes_sbox.
// Checks all 256 entries against the reference S-box (inverse found by
// exhaustive search, affine map by rotations), plus entries of the
// well-known table: 53h -> edh, 00h -> 63h, ffh -> 16h, 11h -> 82h.
module aes_sbox_tb;
  import aes_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [7:0] a, y;

  aes_sbox dut (.a(a), .y(y));

  task automatic expect_eq(logic [7:0] exp);
    checks++;
    if (y !== exp) begin
      failures++;
      $display("FAIL sbox(%h) = %h expected %h", a, y, exp);
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
    a = 8'h53; @(posedge clk); expect_eq(8'hed);
    a = 8'h00; @(posedge clk); expect_eq(8'h63);
    a = 8'hff; @(posedge clk); expect_eq(8'h16);
    a = 8'h11; @(posedge clk); expect_eq(8'h82);
    for (int i = 0; i < 256; i++) begin
      a = 8'(i);
      @(posedge clk);
      expect_eq(ref_sbox(a));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
