// ham15_11_enc - systematic Hamming (15,11) encoder.
//
// The codeword is the message times the generator matrix G = [I11 | P]:
// the 11 data bits are passed through unchanged and followed by 4 check
// bits, each the modulo-2 sum of the data bits that the P matrix assigns to
// it (aes_ham_pkg::HAM_P). The code itself follows the document; the
// column order of P is this design's choice, because the printed
// matrices for the (15,11) code are not reproduced.
//
// Interface: data_i[10:0] in, cw_o = {data_i, parity_o}. Purely
// combinational, no clock.
module ham15_11_enc
  import aes_ham_pkg::*;
(
  input  ham_data_t data_i,
  output ham_par_t  parity_o,
  output ham_cw_t   cw_o
);
  always_comb begin
    parity_o = ham_parity(data_i);
    cw_o     = {data_i, parity_o};
  end
endmodule
