// ham15_11_dec - Hamming (15,11) syndrome decoder with single-error
// correction.
//
// The check bits are recomputed from the received data bits with a
// ham15_11_enc instance and XORed with the received check bits; the
// result is the syndrome S = r * H^T with H = [P^T | I4]. A zero syndrome
// means no error. A syndrome equal to column HAM_P[i] locates a flipped
// data bit i, which is inverted; a syndrome of weight one locates a flipped
// check bit, which is inverted in the corrected codeword. Since all 15
// non-zero syndromes name a bit, every single error is corrected; a double
// error is detected as an error but mis-corrected (minimum distance 3).
//
// Interface: cw_i = {data[10:0], parity[3:0]} in; data_o and cw_o are the
// corrected data and codeword, syndrome_o the syndrome, err_o is high for
// a non-zero syndrome. Purely combinational.
module ham15_11_dec
  import aes_ham_pkg::*;
(
  input  ham_cw_t   cw_i,
  output ham_data_t data_o,
  output ham_cw_t   cw_o,
  output ham_par_t  syndrome_o,
  output logic      err_o
);
  ham_par_t recomputed;
  ham_cw_t  unused_cw;

  ham15_11_enc u_enc (
    .data_i  (cw_i[HAM_N-1:HAM_P_BITS]),
    .parity_o(recomputed),
    .cw_o    (unused_cw)
  );

  always_comb begin
    syndrome_o = recomputed ^ cw_i[HAM_P_BITS-1:0];
    err_o      = (syndrome_o != '0);
    cw_o       = cw_i;
    // error in a data bit
    for (int i = 0; i < HAM_K; i++)
      if (syndrome_o == HAM_P[i]) cw_o[HAM_P_BITS + i] = ~cw_i[HAM_P_BITS + i];
    // error in a check bit
    for (int j = 0; j < HAM_P_BITS; j++)
      if (syndrome_o == ham_par_t'(1 << j)) cw_o[j] = ~cw_i[j];
    data_o = cw_o[HAM_N-1:HAM_P_BITS];
  end
endmodule
