// aes_decipher_control: control unit of the inverse cipher.
//
// Same two-state machine as the cipher's, with the round keys taken in
// reverse: in IDLE rk_idx points at round key NR for the initial XOR
// (load), and in RUN round k (k = 1..NR) uses round key NR-k. last is high
// in round NR, where the data path skips inverse Mix columns. done pulses
// NR+1 clock edges after the edge that sampled start; start is accepted
// only in IDLE with key_ready high. reset is synchronous, active high.
//
// The design only states that decryption reverses the process; the
// reverse key order and the handshake mirror the cipher control unit.
module aes_decipher_control #(
  parameter int unsigned NR = 10,
  localparam int unsigned IW = $clog2(NR + 1)
)(
  input  logic          clk,
  input  logic          reset,
  input  logic          start,
  input  logic          key_ready,
  output logic          load,
  output logic          round_en,
  output logic          last,
  output logic [IW-1:0] rk_idx,
  output logic          busy,
  output logic          done
);

  typedef enum logic {IDLE, RUN} state_e;
  state_e        st;
  logic [IW-1:0] round;

  always_comb begin
    load     = (st == IDLE) && start && key_ready;
    round_en = (st == RUN);
    last     = (st == RUN) && (round == IW'(NR));
    rk_idx   = (st == RUN) ? IW'(NR) - round : IW'(NR);
    busy     = (st == RUN);
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      st    <= IDLE;
      round <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      case (st)
        IDLE: if (load) begin
          st    <= RUN;
          round <= IW'(1);
        end
        RUN: if (last) begin
          st   <= IDLE;
          done <= 1'b1;
        end else begin
          round <= round + 1'b1;
        end
        default: st <= IDLE;
      endcase
    end
  end

  a_round_range: assert property (@(posedge clk) disable iff (reset)
    (st == RUN) |-> (round >= IW'(1) && round <= IW'(NR)));

endmodule
