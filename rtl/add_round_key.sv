// add_round_key - AES AddRoundKey with Hamming fault correction.
//
// The state is XORed with the round key. Since the Hamming check bits are
// linear, the expected check bits of the result are the XOR of the state's
// and the key's check bits; ham_state_check compares them with check bits
// recomputed from the output and corrects a single flipped bit per byte.
// The same block serves as the initial AddRoundKey (plaintext XOR cipher
// key) and as the last step of every round.
//
// Interface: state_i / chk_i, rkey_i / rkey_chk_i in; fault_i XORed onto
// the raw output; state_o / chk_o corrected; err_o, uncorr_o, nerr_o,
// syndrome_o as in
// ham_state_check. Combinational.
module add_round_key
  import aes_ham_pkg::*;
(
  input  state_t     state_i,
  input  chk_t       chk_i,
  input  state_t     rkey_i,
  input  chk_t       rkey_chk_i,
  input  state_t     fault_i,
  output state_t     state_o,
  output chk_t       chk_o,
  output logic       err_o,
  output logic       uncorr_o,
  output logic [4:0] nerr_o,
  output chk_t       syndrome_o
);
  state_t raw;
  chk_t   expect_chk;

  always_comb begin
    raw        = state_i ^ rkey_i ^ fault_i;
    expect_chk = chk_i ^ rkey_chk_i;
  end

  ham_state_check u_chk (
    .state_i (raw),
    .chk_i   (expect_chk),
    .state_o (state_o),
    .chk_o   (chk_o),
    .err_o   (err_o),
    .uncorr_o(uncorr_o),
    .nerr_o  (nerr_o),
    .syndrome_o(syndrome_o)
  );
endmodule
