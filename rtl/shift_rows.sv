// shift_rows - AES ShiftRows with Hamming fault correction.
//
// Row r of the state (bytes r, r+4, r+8, r+12) is rotated left by r
// positions: output byte 4c+r takes input byte 4((c+r) mod 4)+r. The check
// bits of each byte move with it, so the expected check bits of the output
// are the input check bits under the same permutation; ham_state_check
// compares them with check bits recomputed from the (possibly faulty)
// output and corrects a single flipped bit per byte. The permutation is
// the standard one; checking after the step follows the document.
//
// Interface: state_i / chk_i in (chk_i must match state_i); fault_i is
// XORed onto the raw output; state_o / chk_o corrected; err_o, uncorr_o,
// nerr_o,
// syndrome_o as in ham_state_check. Combinational.
module shift_rows
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
        raw[4*c+r]        = state_i[4*((c+r)%4)+r] ^ fault_i[4*c+r];
        expect_chk[4*c+r] = chk_i[4*((c+r)%4)+r];
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
