// aes_cipher_control: control unit of the cipher, a two-state machine
// with the round counter.
//
// In IDLE a start pulse (accepted only while key_ready is high) asserts
// load for the initial round, where the data path XORs the input with
// round key 0, and moves to RUN with the counter at 1. In RUN the counter
// selects round key 1..NR and round_en is high; last is high in round NR,
// which tells the data path to skip Mix columns. After round NR the unit
// returns to IDLE and pulses done for one cycle. An encryption therefore
// takes NR+1 clocks: done is high NR+1 clock edges after the edge that
// sampled start. start is ignored while busy. reset is synchronous,
// active high.
//
// The round counter, the initial round and the last round without Mix
// columns follow the design's flow; the start/done handshake (in place of
// a level enable) and one round per clock are this implementation's
// choices.
module aes_cipher_control #(
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
    rk_idx   = (st == RUN) ? round : '0;
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
