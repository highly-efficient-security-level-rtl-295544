// lst_aes_ham_top - AES-128 encryptor of land-surface-temperature (LST)
// data in which every transformation and both round registers are
// protected by a Hamming (15,11) check-and-correct stage.
//
// Datapath (iterative looping: one combinational round, used ten times):
//
//   block in --> [initial AddRoundKey] --> state reg + check bits
//   state reg --> check/correct --> SubBytes* --> ShiftRows* --> MixColumns*
//             --> (bypassed in round 10) --> AddRoundKey* --> state reg
//   key reg --> check/correct --> key_expand_round --> round key, key reg
//   (* = Hamming check and single-bit correction of the step's output)
//
// That makes six Hamming check points per round: the state register read,
// the key register read and the outputs of the four transformations. Every
// state byte travels with 4 check bits; each step predicts the check bits
// its output must have from its input, and corrects the output where the
// recomputed check bits differ. Round keys are produced one per clock, on
// the fly, so no expanded key table exists.
//
// The block input is 128 bits of computed LST data; the LST-SW computation
// that would produce it is outside this module. The key comes in with each
// block.
//
// Interface and timing (control signals active low, after the document):
//   reset_l     asynchronous reset.
//   write_en_l  low for one cycle while ready_o is high: lst_block_i and
//               key_i are taken. Ignored while ready_o is low.
//   ready_o     high when a new block may be written. A written block takes
//               12 cycles to the next ready cycle, so back-to-back blocks
//               give 128 bits per 12 cycles.
//   data_o, data_valid_o  the ciphertext, valid from 12 cycles after the
//               write until read_en_l is low for a cycle (or a new result
//               arrives). err_block_o / uncorr_block_o tell whether any
//               Hamming stage saw an error / an uncorrectable pattern while
//               this block was processed.
//   err_detect_o  high in every cycle in which a check point sees a non-zero
//               syndrome; err_count_o counts corrected-or-flagged bytes
//               (saturating).
//   inj_sel_i, inj_mask_i  test hook: while rounds run, inj_mask_i is
//               XORed onto the check point chosen by inj_sel_i (a register
//               read or a transformation output), imitating an upset. Tie
//               inj_sel_i to INJ_NONE in use.
// The AES algorithm, the round structure, the MixColumns bypass, the
// check after each step and the 12-cycle block period follow the document;
// the port set, the byte-wise code and the injection hook are this
// design's choices.
module lst_aes_ham_top
  import aes_ham_pkg::*;
(
  input  logic          clk,
  input  logic          reset_l,
  input  logic          write_en_l,
  input  logic          read_en_l,
  input  logic [127:0]  lst_block_i,
  input  logic [127:0]  key_i,
  input  logic [2:0]    inj_sel_i,
  input  logic [127:0]  inj_mask_i,
  output logic          ready_o,
  output logic [127:0]  data_o,
  output logic          data_valid_o,
  output logic          err_block_o,
  output logic          uncorr_block_o,
  output logic          err_detect_o,
  output logic [15:0]   err_count_o
);
  // ---------------------------------------------------------------- control
  logic       load, round_en, last_round, done;
  logic [7:0] rcon;
  logic [3:0] round_no;

  aes_ctrl u_ctrl (
    .clk         (clk),
    .rst_n       (reset_l),
    .start_i     (!write_en_l),
    .ready_o     (ready_o),
    .load_o      (load),
    .round_en_o  (round_en),
    .last_round_o(last_round),
    .done_o      (done),
    .rcon_o      (rcon),
    .round_o     (round_no)
  );

  // ------------------------------------------------------- fault injection
  inj_sel_e inj_sel;
  state_t   f_sreg, f_kreg, f_sb, f_sr, f_mc, f_ark;

  always_comb begin
    inj_sel = inj_sel_e'(inj_sel_i);
    f_sreg  = '0;
    f_kreg  = '0;
    f_sb    = '0;
    f_sr    = '0;
    f_mc    = '0;
    f_ark   = '0;
    if (round_en) begin
      unique case (inj_sel)
        INJ_STATE_REG:  f_sreg = inj_mask_i;
        INJ_KEY_REG:    f_kreg = inj_mask_i;
        INJ_SUB_BYTES:  f_sb   = inj_mask_i;
        INJ_SHIFT_ROWS: f_sr   = inj_mask_i;
        INJ_MIX_COLS:   f_mc   = inj_mask_i;
        INJ_ADD_RKEY:   f_ark  = inj_mask_i;
        default: ;
      endcase
    end
  end

  // -------------------------------------------------------------- registers
  state_t state_q, rkey_q;
  chk_t   chk_q, rkey_chk_q;

  // ---------------------------------------------- initial AddRoundKey (load)
  state_t in_blk, in_key, s_init;
  chk_t   c_init;
  logic   e_init, u_init;
  logic [4:0] n_init;
  chk_t   y_init;

  always_comb begin
    // held at zero until a new block is written
    in_blk = load ? state_t'(lst_block_i) : '0;
    in_key = load ? state_t'(key_i)       : '0;
  end

  add_round_key u_ark0 (
    .state_i   (in_blk),
    .chk_i     (state_parity(in_blk)),
    .rkey_i    (in_key),
    .rkey_chk_i(state_parity(in_key)),
    .fault_i   ('0),
    .state_o   (s_init),
    .chk_o     (c_init),
    .err_o     (e_init),
    .uncorr_o  (u_init),
    .nerr_o    (n_init),
    .syndrome_o(y_init)
  );

  // ------------------------------------------------- register read checks
  state_t s_reg, k_reg;
  chk_t   c_reg, ck_reg;
  logic   e_sreg, u_sreg, e_kreg, u_kreg;
  logic [4:0] n_sreg, n_kreg;
  chk_t   y_sreg, y_kreg;

  ham_state_check u_sreg_chk (
    .state_i (state_q ^ f_sreg),
    .chk_i   (chk_q),
    .state_o (s_reg),
    .chk_o   (c_reg),
    .err_o   (e_sreg),
    .uncorr_o(u_sreg),
    .nerr_o  (n_sreg),
    .syndrome_o(y_sreg)
  );

  ham_state_check u_kreg_chk (
    .state_i (rkey_q ^ f_kreg),
    .chk_i   (rkey_chk_q),
    .state_o (k_reg),
    .chk_o   (ck_reg),
    .err_o   (e_kreg),
    .uncorr_o(u_kreg),
    .nerr_o  (n_kreg),
    .syndrome_o(y_kreg)
  );

  // ------------------------------------------------------------ key round
  state_t rk_next;
  chk_t   rk_next_chk;

  key_expand_round u_kexp (
    .rkey_i    (k_reg),
    .rcon_i    (rcon),
    .rkey_o    (rk_next),
    .rkey_chk_o(rk_next_chk)
  );

  // ------------------------------------------------------------ AES round
  state_t s_sb, s_sr, s_mc, s_pre, s_ark;
  chk_t   c_sb, c_sr, c_mc, c_pre, c_ark;
  logic   e_sb, e_sr, e_mc, e_ark, u_sb, u_sr, u_mc, u_ark;
  logic [4:0] n_sb, n_sr, n_mc, n_ark;
  chk_t   y_sb, y_sr, y_mc, y_ark;

  sub_bytes u_subbytes (
    .state_i(s_reg), .fault_i(f_sb),
    .state_o(s_sb), .chk_o(c_sb), .err_o(e_sb), .uncorr_o(u_sb), .nerr_o(n_sb),
    .syndrome_o(y_sb)
  );

  shift_rows u_shiftrows (
    .state_i(s_sb), .chk_i(c_sb), .fault_i(f_sr),
    .state_o(s_sr), .chk_o(c_sr), .err_o(e_sr), .uncorr_o(u_sr), .nerr_o(n_sr),
    .syndrome_o(y_sr)
  );

  mix_columns u_mixcols (
    .state_i(s_sr), .chk_i(c_sr), .fault_i(f_mc),
    .state_o(s_mc), .chk_o(c_mc), .err_o(e_mc), .uncorr_o(u_mc), .nerr_o(n_mc),
    .syndrome_o(y_mc)
  );

  // last round: MixColumns is skipped
  always_comb begin
    s_pre = last_round ? s_sr : s_mc;
    c_pre = last_round ? c_sr : c_mc;
  end

  add_round_key u_addrk (
    .state_i   (s_pre),
    .chk_i     (c_pre),
    .rkey_i    (rk_next),
    .rkey_chk_i(rk_next_chk),
    .fault_i   (f_ark),
    .state_o   (s_ark),
    .chk_o     (c_ark),
    .err_o     (e_ark),
    .uncorr_o  (u_ark),
    .nerr_o    (n_ark),
    .syndrome_o(y_ark)
  );

  // ------------------------------------------------------- error summary
  logic        err_now, uncorr_now;
  logic [7:0]  nerr_now;

  always_comb begin
    err_now    = 1'b0;
    uncorr_now = 1'b0;
    nerr_now   = '0;
    if (load) begin
      err_now    = e_init;
      uncorr_now = u_init;
      nerr_now   = 8'(n_init);
    end else if (round_en) begin
      err_now    = e_sreg | e_kreg | e_sb | e_sr | (e_mc & !last_round) | e_ark;
      uncorr_now = u_sreg | u_kreg | u_sb | u_sr | (u_mc & !last_round) | u_ark;
      nerr_now   = 8'(n_sreg) + 8'(n_kreg) + 8'(n_sb) + 8'(n_sr)
                 + (last_round ? 8'd0 : 8'(n_mc)) + 8'(n_ark);
    end else if (done) begin
      err_now    = e_sreg;
      uncorr_now = u_sreg;
      nerr_now   = 8'(n_sreg);
    end
    err_detect_o = err_now;
  end

  // ---------------------------------------------------------- sequential
  logic err_acc_q, uncorr_acc_q;

  always_ff @(posedge clk or negedge reset_l) begin
    if (!reset_l) begin
      state_q        <= '0;
      chk_q          <= '0;
      rkey_q         <= '0;
      rkey_chk_q     <= '0;
      data_o         <= '0;
      data_valid_o   <= 1'b0;
      err_block_o    <= 1'b0;
      uncorr_block_o <= 1'b0;
      err_acc_q      <= 1'b0;
      uncorr_acc_q   <= 1'b0;
      err_count_o    <= '0;
    end else begin
      if (load) begin
        state_q      <= s_init;
        chk_q        <= c_init;
        rkey_q       <= in_key;
        rkey_chk_q   <= state_parity(in_key);
        err_acc_q    <= err_now;
        uncorr_acc_q <= uncorr_now;
      end else if (round_en) begin
        state_q      <= s_ark;
        chk_q        <= c_ark;
        rkey_q       <= rk_next;
        rkey_chk_q   <= rk_next_chk;
        err_acc_q    <= err_acc_q | err_now;
        uncorr_acc_q <= uncorr_acc_q | uncorr_now;
      end

      if (done) begin
        data_o         <= s_reg;
        data_valid_o   <= 1'b1;
        err_block_o    <= err_acc_q | err_now;
        uncorr_block_o <= uncorr_acc_q | uncorr_now;
      end else if (!read_en_l) begin
        data_valid_o   <= 1'b0;
      end

      if (err_count_o + 16'(nerr_now) < err_count_o)
        err_count_o <= 16'hFFFF;
      else
        err_count_o <= err_count_o + 16'(nerr_now);
    end
  end

  // a block is only ever taken while the FSM is idle
  a_load_when_ready: assert property (@(posedge clk) disable iff (!reset_l)
    load |-> ready_o);

  // per-byte syndromes and the round number are kept for debug visibility
  logic unused_dbg;
  assign unused_dbg = ^{round_no, y_init, y_sreg, y_kreg, y_sb, y_sr, y_mc, y_ark,
                        c_reg, ck_reg};
endmodule
