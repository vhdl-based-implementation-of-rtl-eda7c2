// aes_inv_sbox_tb: self-checking testbench for aes_inv_sbox.
// Checks all 256 entries: for every x, inv_sbox(S(x)) must be x, with S
// the reference S-box of aes_ref_pkg. Also the example pairs read
// backwards: edh -> 53h, 63h -> 00h, 16h -> ffh, 82h -> 11h.
module aes_inv_sbox_tb;
  import aes_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [7:0] a, y;

  aes_inv_sbox dut (.a(a), .y(y));

  task automatic expect_eq(logic [7:0] exp);
    checks++;
    if (y !== exp) begin
      failures++;
      $display("FAIL inv_sbox(%h) = %h expected %h", a, y, exp);
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
    a = 8'hed; @(posedge clk); expect_eq(8'h53);
    a = 8'h63; @(posedge clk); expect_eq(8'h00);
    a = 8'h16; @(posedge clk); expect_eq(8'hff);
    a = 8'h82; @(posedge clk); expect_eq(8'h11);
    for (int i = 0; i < 256; i++) begin
      a = ref_sbox(8'(i));
      @(posedge clk);
      expect_eq(8'(i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
