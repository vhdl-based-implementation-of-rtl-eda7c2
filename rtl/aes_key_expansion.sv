// aes_key_expansion: AES-128 key schedule with its word store.
//
// The cipher key is expanded into NB*(NR+1) 32-bit words (44 for NR = 10)
// that are kept as a linear array of registers. A word is a column of the
// key matrix: with the row-major layout of aes_pkg, word c of the key is
// {key(0,c), key(1,c), key(2,c), key(3,c)}. Each later group of four words
// follows the standard rule w[i] = w[i-4] ^ temp, where for the first word
// of a group temp = SubWord(RotWord(w[i-1])) ^ {Rcon,000000h} and for the
// others temp = w[i-1]. One round key (four words) is produced per clock,
// using four S-boxes, so the schedule is complete NR clocks after load.
//
// Interface: pulse load with key valid; ready drops in the next cycle and
// rises again NR+1 clock edges after the edge that sampled load. load is
// honoured at any time and restarts the expansion. Two independent
// asynchronous read ports return round key idx_a / idx_b already in the
// row-major state layout, so it can be XORed straight onto the state;
// they are valid while ready is high. reset is synchronous, active high.
//
// The word array of NB*(NR+1) words follows the design's description;
// the one-round-key-per-clock timing, the load/ready handshake and the two
// read ports are this implementation's choices.
module aes_key_expansion
  import aes_pkg::*;
#(
  parameter int unsigned NR = 10,
  localparam int unsigned IW = $clog2(NR + 1)
)(
  input  logic          clk,
  input  logic          reset,
  input  logic          load,
  input  state_t        key,
  output logic          ready,
  input  logic [IW-1:0] idx_a,
  output state_t        rk_a,
  input  logic [IW-1:0] idx_b,
  output state_t        rk_b
);

  localparam int unsigned NW = NB * (NR + 1);

  word_t         w [NW];
  logic [IW-1:0] rnd;        // round key being produced
  byte_t         rcon;
  logic          busy;

  // SubWord(RotWord(last word of the previous round key))
  word_t prev_last, rot, sub;
  assign prev_last = w[NB*rnd - 1];
  assign rot       = {prev_last[23:0], prev_last[31:24]};
  for (genvar j = 0; j < 4; j++) begin : g_sub
    aes_sbox u_sbox (.a(rot[8*j +: 8]), .y(sub[8*j +: 8]));
  end

  word_t nw [NB];
  always_comb begin
    nw[0] = w[NB*rnd - 4] ^ sub ^ {rcon, 24'h000000};
    for (int j = 1; j < NB; j++) nw[j] = w[NB*rnd - 4 + j] ^ nw[j-1];
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      busy  <= 1'b0;
      ready <= 1'b0;
      rnd   <= IW'(1);
      rcon  <= 8'h01;
    end else if (load) begin
      for (int c = 0; c < NB; c++)
        w[c] <= {get_b(key, 0, c), get_b(key, 1, c), get_b(key, 2, c), get_b(key, 3, c)};
      busy  <= 1'b1;
      ready <= 1'b0;
      rnd   <= IW'(1);
      rcon  <= 8'h01;
    end else if (busy) begin
      for (int j = 0; j < NB; j++) w[NB*rnd + j] <= nw[j];
      rcon <= xtime(rcon);
      if (rnd == IW'(NR)) begin
        busy  <= 1'b0;
        ready <= 1'b1;
      end else begin
        rnd <= rnd + 1'b1;
      end
    end
  end

  // round key i in state layout: byte (r,c) = byte r of word NB*i+c
  function automatic state_t round_key(logic [IW-1:0] i);
    state_t k;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < NB; c++)
        k[127 - 8*(4*r + c) -: 8] = w[NB*i + c][31 - 8*r -: 8];
    return k;
  endfunction

  assign rk_a = round_key(idx_a);
  assign rk_b = round_key(idx_b);

endmodule
