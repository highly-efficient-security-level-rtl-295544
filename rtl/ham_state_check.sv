// ham_state_check - Hamming check-and-correct of a whole AES state.
//
// Each of the 16 state bytes is checked against its expected (predicted or
// stored) 4 check bits: the byte and its expected check bits form a
// (15,11) codeword with data bits 10:8 at zero, which a ham15_11_dec
// decodes. A single flipped bit in a byte, or in its check bits, is
// corrected. A syndrome that points at one of the unused data bits 10:8
// cannot come from a single error; the byte is then passed on unchanged
// and uncorr_o is raised. Comparing expected against recomputed check
// bits and correcting follows the document (its Fig. 5 flow); one codeword
// per byte is this design's choice.
//
// Interface: state_i / chk_i in; state_o, chk_o corrected; err_o is high
// when any byte had a non-zero syndrome, uncorr_o when any byte could not
// be corrected, nerr_o counts the bytes with a non-zero syndrome and
// syndrome_o gives each byte's syndrome.
// Purely combinational.
module ham_state_check
  import aes_ham_pkg::*;
(
  input  state_t      state_i,
  input  chk_t        chk_i,
  output state_t      state_o,
  output chk_t        chk_o,
  output logic        err_o,
  output logic        uncorr_o,
  output logic [4:0]  nerr_o,
  output chk_t        syndrome_o
);
  ham_cw_t   cw_out  [NB_BYTES];
  ham_data_t dat_out [NB_BYTES];
  logic [NB_BYTES-1:0] err_b;

  for (genvar k = 0; k < NB_BYTES; k++) begin : g_byte
    ham15_11_dec u_dec (
      .cw_i      ({3'b000, state_i[k], chk_i[k]}),
      .data_o    (dat_out[k]),
      .cw_o      (cw_out[k]),
      .syndrome_o(syndrome_o[k]),
      .err_o     (err_b[k])
    );
  end

  always_comb begin
    uncorr_o = 1'b0;
    nerr_o   = '0;
    for (int k = 0; k < NB_BYTES; k++) begin
      nerr_o = nerr_o + 5'(err_b[k]);
      if (dat_out[k][HAM_K-1:8] != '0) begin
        uncorr_o   = 1'b1;
        state_o[k] = state_i[k];
        chk_o[k]   = chk_i[k];
      end else begin
        state_o[k] = dat_out[k][7:0];
        chk_o[k]   = cw_out[k][HAM_P_BITS-1:0];
      end
    end
    err_o = |err_b;
  end
endmodule
