// mix_columns - AES MixColumns with Hamming fault correction.
//
// Each column (a0..a3) is multiplied by the circulant matrix
// [2 3 1 1] in GF(2^8): b_r = 2a_r ^ 3a_(r+1) ^ a_(r+2) ^ a_(r+3).
// The expected check bits are predicted without using the output: the
// Hamming check bits are linear, and b_r = xtime(a_r ^ a_(r+1)) ^ a_(r+1) ^
// a_(r+2) ^ a_(r+3), so chk(b_r) = chk(xtime(a_r ^ a_(r+1))) ^ chk_i(a_(r+1))
// ^ chk_i(a_(r+2)) ^ chk_i(a_(r+3)). ham_state_check compares that with the
// output and corrects a single flipped bit per byte. Checking after
// MixColumns follows the document; this prediction is this design's way of
// producing the expected check bits.
//
// Interface: state_i / chk_i in; fault_i XORed onto the raw output;
// state_o / chk_o corrected; err_o, uncorr_o, nerr_o,
// syndrome_o as in
// ham_state_check. Combinational.
module mix_columns
  import aes_ham_pkg::*;
(
  input  state_t     state_i,
  input  chk_t       chk_i,
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
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) begin
        logic [7:0] a0, a1, a2, a3;
        a0 = state_i[4*c + r];
        a1 = state_i[4*c + (r+1)%4];
        a2 = state_i[4*c + (r+2)%4];
        a3 = state_i[4*c + (r+3)%4];
        raw[4*c+r] = xtime(a0) ^ (xtime(a1) ^ a1) ^ a2 ^ a3 ^ fault_i[4*c+r];
        expect_chk[4*c+r] = ham_parity8(xtime(a0 ^ a1))
                          ^ chk_i[4*c + (r+1)%4]
                          ^ chk_i[4*c + (r+2)%4]
                          ^ chk_i[4*c + (r+3)%4];
      end
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
