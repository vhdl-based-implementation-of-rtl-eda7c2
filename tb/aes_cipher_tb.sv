// aes_cipher_tb: self-checking testbench for aes_cipher (control unit and
// data path together). The testbench serves round keys from the reference
// expansion at whatever index the unit asks for. Checks the FIPS-197
// appendix B and C.1 vectors (transposed into the row-major layout) and
// random blocks against the reference cipher, that done comes NR+1 edges
// after the start edge, that busy covers the rounds, and that a start
// during an operation or without key_ready is ignored. A second instance
// with NR = 7 runs the same random blocks against a 7-round reference.
module aes_cipher_tb;
  import aes_ref_pkg::*;

  localparam int NR = 10;
  localparam int NR7 = 7;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic         reset, start, key_ready, busy, done, busy7, done7;
  logic [127:0] data_in, key, rk, rk7, data_out, data_out7;
  logic [3:0]   rk_idx;
  logic [2:0]   rk_idx7;
  logic [127:0] rks [NR+1];
  logic [127:0] rks7 [NR7+1];

  aes_cipher #(.NR(NR)) dut (
    .clk, .reset, .start, .key_ready, .data_in, .rk_idx, .rk, .data_out, .busy, .done
  );
  aes_cipher #(.NR(NR7)) dut7 (
    .clk, .reset, .start, .key_ready, .data_in, .rk_idx(rk_idx7), .rk(rk7),
    .data_out(data_out7), .busy(busy7), .done(done7)
  );

  assign rk  = rks[rk_idx];
  assign rk7 = rks7[rk_idx7];

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic set_key(logic [127:0] k);
    key = k;
    for (int i = 0; i <= NR; i++) rks[i] = ref_round_key(k, NR, i);
    for (int i = 0; i <= NR7; i++) rks7[i] = ref_round_key(k, NR7, i);
  endtask

  task automatic encrypt(logic [127:0] pt);
    int n = 0;
    logic [127:0] exp = ref_encrypt(pt, key, NR);
    data_in = pt; start = 1'b1;
    @(posedge clk); #1;
    check(busy, "busy after start");
    data_in = ~pt;                 // a second start during the run is ignored
    while (!done) begin
      @(posedge clk); #1 n++;
      if (n == 3) start = 1'b0;
      if (n > 3 * NR) break;
    end
    start = 1'b0;
    check(n == NR, $sformatf("done %0d edges after start, expected %0d", n + 1, NR + 1));
    check(data_out === exp, $sformatf("cipher text %h expected %h", data_out, exp));
    check(done7 === 1'b0 && busy7 === 1'b0, "7-round unit finished earlier");
    check(data_out7 === ref_encrypt(pt, key, NR7), "7-round cipher text");
    @(posedge clk); #1;
    check(!done && data_out === exp, "done is a pulse, result held");
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1'b1; start = 1'b0; key_ready = 1'b0; data_in = '0;
    set_key('0);
    repeat (2) @(posedge clk);
    #1 reset = 1'b0;
    start = 1'b1;
    @(posedge clk); #1 start = 1'b0;
    check(!busy, "start without key_ready ignored");
    key_ready = 1'b1;

    set_key(transpose(128'h000102030405060708090a0b0c0d0e0f));
    encrypt(transpose(128'h00112233445566778899aabbccddeeff));
    check(data_out === transpose(128'h69c4e0d86a7b0430d8cdb78070b4c55a), "FIPS-197 C.1");
    set_key(transpose(128'h2b7e151628aed2a6abf7158809cf4f3c));
    encrypt(transpose(128'h3243f6a8885a308d313198a2e0370734));
    check(data_out === transpose(128'h3925841d02dc09fbdc118597196a0b32), "FIPS-197 B");
    for (int t = 0; t < 20; t++) begin
      set_key({$urandom, $urandom, $urandom, $urandom});
      encrypt({$urandom, $urandom, $urandom, $urandom});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
