// aes_cipher_datapath_tb: self-checking testbench for aes_cipher_datapath.
// Plays the control unit: one load cycle with round key 0, then NR round
// cycles with round keys 1..NR and last in round NR, the round keys coming
// from the reference expansion. The state after every round is compared
// with the reference round function, and the result with the FIPS-197
// appendix C.1 cipher text (transposed into the row-major layout) and with
// the reference cipher for random blocks and keys. A hold cycle checks
// that the state keeps its value when neither load nor round_en is high.
module aes_cipher_datapath_tb;
  import aes_ref_pkg::*;

  localparam int NR = 10;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic         reset, load, round_en, last;
  logic [127:0] data_in, rk, data_out;

  aes_cipher_datapath dut (.*);

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic encrypt(logic [127:0] pt, logic [127:0] key);
    logic [127:0] s;
    data_in = pt; rk = ref_round_key(key, NR, 0); load = 1'b1;
    s = pt ^ rk;
    @(posedge clk); #1 load = 1'b0;
    check(data_out === s, "initial round");
    for (int k = 1; k <= NR; k++) begin
      rk = ref_round_key(key, NR, k); round_en = 1'b1; last = (k == NR);
      s = ref_shift_rows(ref_sub_bytes(s));
      if (k != NR) s = ref_mix_columns(s);
      s ^= rk;
      @(posedge clk); #1;
      check(data_out === s, $sformatf("state after round %0d: %h expected %h", k, data_out, s));
    end
    round_en = 1'b0; last = 1'b0;
    @(posedge clk); #1;
    check(data_out === s, "state held");
    check(data_out === ref_encrypt(pt, key, NR), "reference cipher");
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1'b1; load = 1'b0; round_en = 1'b0; last = 1'b0; data_in = '0; rk = '0;
    repeat (2) @(posedge clk);
    #1 check(data_out === '0, "cleared by reset");
    reset = 1'b0;
    encrypt(transpose(128'h00112233445566778899aabbccddeeff), transpose(128'h000102030405060708090a0b0c0d0e0f));
    check(data_out === transpose(128'h69c4e0d86a7b0430d8cdb78070b4c55a), "FIPS-197 C.1 cipher text");
    encrypt(transpose(128'h3243f6a8885a308d313198a2e0370734), transpose(128'h2b7e151628aed2a6abf7158809cf4f3c));
    check(data_out === transpose(128'h3925841d02dc09fbdc118597196a0b32), "FIPS-197 B cipher text");
    for (int t = 0; t < 20; t++)
      encrypt({$urandom, $urandom, $urandom, $urandom}, {$urandom, $urandom, $urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
