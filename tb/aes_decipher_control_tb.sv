// aes_decipher_control_tb: self-checking testbench for aes_decipher_control.
// Runs several operations and checks, cycle by cycle, that load is given
// once with round key NR, that round_en runs for exactly NR cycles with
// round keys NR-1..0 in order, that last is high only in round NR, that done
// is a single pulse NR+1 edges after the start edge, and that start is
// ignored without key_ready and while busy.
module aes_decipher_control_tb;
  localparam int NR = 10;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic       reset, start, key_ready, load, round_en, last, busy, done;
  logic [3:0] rk_idx;

  aes_decipher_control #(.NR(NR)) dut (.*);

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  task automatic run_one(bit poke_start);
    start = 1'b1; #1;
    check(load && !busy && rk_idx == 4'(NR), "load with round key NR");
    @(posedge clk); #1 start = poke_start;   // start held high must be ignored
    for (int k = 1; k <= NR; k++) begin
      check(round_en && busy && !load, $sformatf("round %0d enabled", k));
      check(rk_idx == 4'(NR - k), $sformatf("round %0d key index %0d", k, rk_idx));
      check(last == (k == NR), $sformatf("last in round %0d", k));
      check(!done, "no early done");
      @(posedge clk); #1;
    end
    start = 1'b0;
    check(done && !busy && !round_en, "done pulse after NR+1 edges");
    @(posedge clk); #1;
    check(!done, "done lasts one cycle");
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1'b1; start = 1'b0; key_ready = 1'b0;
    repeat (2) @(posedge clk);
    #1 reset = 1'b0;
    check(!busy && !done, "idle after reset");
    start = 1'b1; #1;
    check(!load, "no load without key_ready");
    @(posedge clk); #1;
    check(!busy, "start without key_ready ignored");
    key_ready = 1'b1;
    run_one(1'b0);
    run_one(1'b1);
    @(posedge clk); #1;
    run_one(1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
