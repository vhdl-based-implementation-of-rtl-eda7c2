// aes_inv_mix_columns_tb: self-checking testbench for aes_inv_mix_columns.
// Feeds the Mix columns result 77665544_38291a0b_ffeeddcc_b0a19283 back and
// expects ffeeddcc_bbaa9988_77665544_33221100, then random states x, applied
// as MixColumns(x), must return x.
// A free-running clock only paces the checks and the watchdog.
module aes_inv_mix_columns_tb;
  import aes_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [127:0] x, y;

  aes_inv_mix_columns dut (.state_i(x), .state_o(y));

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
    x = 128'h7766554438291a0bffeeddccb0a19283; @(posedge clk);
    expect_eq(y, 128'hffeeddccbbaa99887766554433221100, "example");
    for (int i = 0; i < 300; i++) begin
      x = {$urandom, $urandom, $urandom, $urandom};
      @(posedge clk);
      begin automatic logic [127:0] keep = x; x = ref_mix_columns(keep); @(posedge clk); expect_eq(y, keep, "random"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
