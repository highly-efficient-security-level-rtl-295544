// key_expand_round - one round of the AES-128 key schedule.
//
// From round key i (words w0..w3) it forms round key i+1:
//   t  = SubWord(RotWord(w3)) ^ {rcon, 0, 0, 0}
//   w0' = w0 ^ t, w1' = w1 ^ w0', w2' = w2 ^ w1', w3' = w3 ^ w2'.
// Used once per clock, it produces the round keys on the fly, so no
// table of the ten expanded keys is stored, as the document describes.
// It also returns the Hamming check bits of the new key, which the key
// register stores beside it.
//
// Interface: rkey_i (bytes 0..15, word j = bytes 4j..4j+3), rcon_i in;
// rkey_o, rkey_chk_o out. Combinational.
module key_expand_round
  import aes_ham_pkg::*;
(
  input  state_t     rkey_i,
  input  logic [7:0] rcon_i,
  output state_t     rkey_o,
  output chk_t       rkey_chk_o
);
  localparam sbox_tab_t SBOX = make_sbox();

  logic [0:3][7:0] t;

  always_comb begin
    // RotWord then SubWord of w3, then Rcon on the first byte
    t[0] = SBOX[rkey_i[13]] ^ rcon_i;
    t[1] = SBOX[rkey_i[14]];
    t[2] = SBOX[rkey_i[15]];
    t[3] = SBOX[rkey_i[12]];
    for (int b = 0; b < 4; b++) rkey_o[b] = rkey_i[b] ^ t[b];
    for (int w = 1; w < 4; w++)
      for (int b = 0; b < 4; b++)
        rkey_o[4*w+b] = rkey_i[4*w+b] ^ rkey_o[4*(w-1)+b];
    rkey_chk_o = state_parity(rkey_o);
  end
endmodule
