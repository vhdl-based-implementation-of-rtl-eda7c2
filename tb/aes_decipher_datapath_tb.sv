// aes_decipher_datapath_tb: self-checking testbench for
// aes_decipher_datapath. Plays the control unit: one load cycle with round
// key NR, then NR round cycles with round keys NR-1..0 and last in round
// NR. The cipher text is made by the reference cipher; after inverse
// round k the state must equal ShiftRows(SubBytes(s)) of the encryption
// state s after round NR-k-1, and the result must be the plain text. The
// FIPS-197 appendix C.1 vector (transposed) is decrypted as well.
module aes_decipher_datapath_tb;
  import aes_ref_pkg::*;

  localparam int NR = 10;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic         reset, load, round_en, last;
  logic [127:0] data_in, rk, data_out;

  aes_decipher_datapath dut (.*);

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic decrypt(logic [127:0] pt, logic [127:0] key);
    logic [127:0] s [NR+1];
    // encryption states from the reference round function
    s[0] = pt ^ ref_round_key(key, NR, 0);
    for (int k = 1; k <= NR; k++) begin
      s[k] = ref_shift_rows(ref_sub_bytes(s[k-1]));
      if (k != NR) s[k] = ref_mix_columns(s[k]);
      s[k] ^= ref_round_key(key, NR, k);
    end
    check(s[NR] === ref_encrypt(pt, key, NR), "reference self-consistency");
    data_in = s[NR]; rk = ref_round_key(key, NR, NR); load = 1'b1;
    @(posedge clk); #1 load = 1'b0;
    check(data_out === ref_shift_rows(ref_sub_bytes(s[NR-1])), "initial round");
    for (int k = 1; k <= NR; k++) begin
      rk = ref_round_key(key, NR, NR - k); round_en = 1'b1; last = (k == NR);
      @(posedge clk); #1;
      if (k != NR)
        check(data_out === ref_shift_rows(ref_sub_bytes(s[NR-k-1])),
              $sformatf("state after inverse round %0d: %h", k, data_out));
    end
    round_en = 1'b0; last = 1'b0;
    check(data_out === pt, $sformatf("plain text %h expected %h", data_out, pt));
    @(posedge clk); #1;
    check(data_out === pt, "state held");
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
    decrypt(transpose(128'h00112233445566778899aabbccddeeff), transpose(128'h000102030405060708090a0b0c0d0e0f));
    for (int t = 0; t < 20; t++)
      decrypt({$urandom, $urandom, $urandom, $urandom}, {$urandom, $urandom, $urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
