// aes_top_tb: end-to-end testbench for aes_top at its default parameters
// (NR = 10). It loads keys, encrypts and decrypts blocks and compares
// every result with the reference cipher; FIPS-197 appendix B and C.1
// vectors are applied in the row-major layout (transposed). Timing is
// checked: key_ready NR+1 edges after key_load, done NR+1 edges after
// start. Each mechanism of the design is provoked and counted, and one
// that never happened counts as a failure: key expansion, encryption,
// decryption, a change of key, a round trip (decrypting what the design
// encrypted), start ignored while busy, start ignored while the key
// schedule is being built, and key_load ignored while busy.
module aes_top_tb;
  import aes_ref_pkg::*;

  localparam int NR = 10;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_key = 0, n_enc = 0, n_dec = 0, n_key_change = 0, n_round_trip = 0;
  int n_start_busy = 0, n_start_nokey = 0, n_keyload_busy = 0;

  logic         reset, key_load, key_ready, start, decrypt, busy, done;
  logic [127:0] key, data_in, data_out, cur_key;

  aes_top dut (.*);

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  task automatic load_key(logic [127:0] k, bit poke_start);
    int n = 0;
    if (k != cur_key && n_key > 0) n_key_change++;
    key = k; key_load = 1'b1;
    @(posedge clk); #1 key_load = 1'b0;
    check(!key_ready, "key_ready drops on key_load");
    if (poke_start) begin          // start while the schedule is built
      start = 1'b1; decrypt = 1'b0;
      @(posedge clk); #1 start = 1'b0; n++;
      check(!busy, "start ignored while key not ready");
      if (!busy) n_start_nokey++;
    end
    while (!key_ready && n <= 3 * NR) begin @(posedge clk); #1 n++; end
    check(n == NR, $sformatf("key_ready %0d edges after key_load, expected %0d", n + 1, NR + 1));
    cur_key = k;
    n_key++;
  endtask

  // one operation; optionally poke start and key_load while it runs
  task automatic run(bit dec, logic [127:0] din, logic [127:0] exp, bit poke);
    int n = 0;
    data_in = din; decrypt = dec; start = 1'b1;
    @(posedge clk); #1 start = 1'b0;
    check(busy, "busy after start");
    while (!done && n <= 3 * NR) begin
      if (poke && n == 2) begin
        start = 1'b1; decrypt = ~dec; data_in = ~din;
        key = ~cur_key; key_load = 1'b1;
      end else begin
        start = 1'b0; key_load = 1'b0;
      end
      @(posedge clk); #1 n++;
      if (poke && n == 3) begin
        check(busy && key_ready, "start and key_load ignored while busy");
        if (busy) n_start_busy++;
        if (key_ready) n_keyload_busy++;
      end
    end
    start = 1'b0; key_load = 1'b0;
    check(n == NR, $sformatf("done %0d edges after start, expected %0d", n + 1, NR + 1));
    check(data_out === exp, $sformatf("%s: %h -> %h expected %h", dec ? "decrypt" : "encrypt", din, data_out, exp));
    if (dec) n_dec++; else n_enc++;
    @(posedge clk); #1;
    check(!done && !busy && data_out === exp, "result held, done is a pulse");
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] pt, ct, k;
    reset = 1'b1; key_load = 1'b0; start = 1'b0; decrypt = 1'b0;
    key = '0; data_in = '0; cur_key = '0;
    repeat (3) @(posedge clk);
    #1 reset = 1'b0;
    check(!key_ready && !busy && !done && data_out === '0, "state after reset");

    // FIPS-197 C.1, both directions
    load_key(transpose(128'h000102030405060708090a0b0c0d0e0f), 1'b1);
    run(1'b0, transpose(128'h00112233445566778899aabbccddeeff),
        transpose(128'h69c4e0d86a7b0430d8cdb78070b4c55a), 1'b1);
    run(1'b1, transpose(128'h69c4e0d86a7b0430d8cdb78070b4c55a),
        transpose(128'h00112233445566778899aabbccddeeff), 1'b0);
    // FIPS-197 B
    load_key(transpose(128'h2b7e151628aed2a6abf7158809cf4f3c), 1'b0);
    run(1'b0, transpose(128'h3243f6a8885a308d313198a2e0370734),
        transpose(128'h3925841d02dc09fbdc118597196a0b32), 1'b0);
    run(1'b1, transpose(128'h3925841d02dc09fbdc118597196a0b32),
        transpose(128'h3243f6a8885a308d313198a2e0370734), 1'b1);

    // random keys, several blocks per key, round trips through the design
    for (int t = 0; t < 8; t++) begin
      k = {$urandom, $urandom, $urandom, $urandom};
      load_key(k, t[0]);
      for (int b = 0; b < 4; b++) begin
        pt = {$urandom, $urandom, $urandom, $urandom};
        ct = ref_encrypt(pt, k, NR);
        run(1'b0, pt, ct, b == 1);
        ct = data_out;
        run(1'b1, ct, pt, b == 2);
        n_round_trip++;
      end
    end

    check(n_key > 0, "key expansion happened");
    check(n_enc > 0, "encryption happened");
    check(n_dec > 0, "decryption happened");
    check(n_key_change > 0, "key change happened");
    check(n_round_trip > 0, "round trip happened");
    check(n_start_busy > 0, "start while busy happened");
    check(n_start_nokey > 0, "start while key not ready happened");
    check(n_keyload_busy > 0, "key_load while busy happened");
    $display("key expansions %0d, encryptions %0d, decryptions %0d, key changes %0d, round trips %0d",
             n_key, n_enc, n_dec, n_key_change, n_round_trip);
    $display("ignored: start while busy %0d, start without key %0d, key_load while busy %0d",
             n_start_busy, n_start_nokey, n_keyload_busy);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
