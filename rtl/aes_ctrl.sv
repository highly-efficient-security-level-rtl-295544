// aes_ctrl - sequencing FSM of the iterative-looping AES-128 datapath.
//
// IDLE:  waiting for a block; ready_o is high. When start_i is high the
//        block is loaded (load_o): the initial AddRoundKey result goes into
//        the state register and the cipher key into the key register.
//        While no block is loaded, load_o is low and the top forces the
//        inputs of the initial AddRoundKey to zero.
// ROUND: one full round per clock for rounds 1..NUM_ROUNDS (round_en_o).
//        rcon_o is the key-schedule round constant (01, 02, 04, ...,
//        multiplied by x each round). In the last round last_round_o is
//        high and the datapath bypasses MixColumns.
// DONE:  one cycle in which the final state is checked and copied to the
//        output register (done_o); then back to IDLE.
// A block therefore takes 1 + NUM_ROUNDS + 1 = 12 cycles from accepted
// start to the next accepted start, the cycle count the document gives
// for its 1854.82 Mbit/s (128 bit x 173.89 MHz / 12). The document's text
// also mentions 10 cycles between pixels; the 12 of its results table is
// followed here. The state encoding is this design's choice.
//
// Interface: clk, rst_n (asynchronous, active low), start_i; outputs as
// above plus round_o, the current round number (0 outside ROUND).
module aes_ctrl
  import aes_ham_pkg::*;
#(
  parameter int unsigned ROUNDS = NUM_ROUNDS
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start_i,
  output logic       ready_o,
  output logic       load_o,
  output logic       round_en_o,
  output logic       last_round_o,
  output logic       done_o,
  output logic [7:0] rcon_o,
  output logic [3:0] round_o
);
  typedef enum logic [1:0] {ST_IDLE, ST_ROUND, ST_DONE} ctrl_state_e;

  ctrl_state_e st_q, st_d;
  logic [3:0]  rnd_q;
  logic [7:0]  rcon_q;

  always_comb begin
    st_d = st_q;
    unique case (st_q)
      ST_IDLE:  if (start_i) st_d = ST_ROUND;
      ST_ROUND: if (rnd_q == 4'(ROUNDS)) st_d = ST_DONE;
      ST_DONE:  st_d = ST_IDLE;
      default:  st_d = ST_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q   <= ST_IDLE;
      rnd_q  <= '0;
      rcon_q <= 8'h01;
    end else begin
      st_q <= st_d;
      if (st_q == ST_IDLE && start_i) begin
        rnd_q  <= 4'd1;
        rcon_q <= 8'h01;
      end else if (st_q == ST_ROUND) begin
        rnd_q  <= (st_d == ST_ROUND) ? rnd_q + 4'd1 : 4'd0;
        rcon_q <= xtime(rcon_q);
      end
    end
  end

  always_comb begin
    ready_o      = (st_q == ST_IDLE);
    load_o       = ready_o && start_i;
    round_en_o   = (st_q == ST_ROUND);
    last_round_o = round_en_o && (rnd_q == 4'(ROUNDS));
    done_o       = (st_q == ST_DONE);
    rcon_o       = rcon_q;
    round_o      = round_en_o ? rnd_q : 4'd0;
  end

  // the round counter never leaves 1..ROUNDS while rounds run
  a_round_range: assert property (@(posedge clk) disable iff (!rst_n)
    round_en_o |-> (rnd_q >= 4'd1 && rnd_q <= 4'(ROUNDS)));
endmodule
