// sub_bytes - AES SubBytes with Hamming fault correction.
//
// Sixteen S-boxes substitute the 16 state bytes. In parallel, a second
// 256-entry table, indexed by the same input byte, gives the Hamming
// check bits the S-box output must have. Because the expected check bits
// come from the input and not from the S-box output, a fault in an S-box
// output byte (injected here through fault_i) shows as a syndrome and a
// single flipped bit per byte is corrected by ham_state_check before the
// state leaves the block. Both tables are built at elaboration from the
// GF(2^8) definition (aes_ham_pkg); on an FPGA they map to ROM.
// The S-box and the pre-computed check-bit table follow the document; the
// fault_i test input is this design's addition.
//
// Interface: state_i in; fault_i is XORed onto the raw S-box output (zero
// in normal use); state_o / chk_o are the corrected state and its check
// bits; err_o, uncorr_o, nerr_o,
// syndrome_o as in ham_state_check. Combinational.
module sub_bytes
  import aes_ham_pkg::*;
(
  input  state_t     state_i,
  input  state_t     fault_i,
  output state_t     state_o,
  output chk_t       chk_o,
  output logic       err_o,
  output logic       uncorr_o,
  output logic [4:0] nerr_o,
  output chk_t       syndrome_o
);
  localparam sbox_tab_t SBOX     = make_sbox();
  localparam par_tab_t  SBOX_PAR = make_sbox_par();

  state_t raw;
  chk_t   expect_chk;

  always_comb begin
    for (int k = 0; k < NB_BYTES; k++) begin
      raw[k]        = SBOX[state_i[k]] ^ fault_i[k];
      expect_chk[k] = SBOX_PAR[state_i[k]];
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
