// tb_ham15_11_dec - exhaustive single-error check of the Hamming (15,11)
// decoder. Every one of the 2048 data words is encoded with the reference
// check bits and presented clean and with each of the 15 single-bit errors;
// the decoder must return the original data and codeword, flag the error
// and give the syndrome of the flipped position (column of H).
module tb_ham15_11_dec;
  import aes_ham_pkg::*;
  import aes_ref_pkg::*;

  int checks = 0, failures = 0;
  ham_cw_t   cw_in, cw_out;
  ham_data_t d_out;
  ham_par_t  syn;
  logic      err;

  ham15_11_dec dut (.cw_i(cw_in), .data_o(d_out), .cw_o(cw_out),
                    .syndrome_o(syn), .err_o(err));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ham_cw_t clean;
    ham_par_t exp_syn;
    for (int i = 0; i < 2048; i++) begin
      clean = {11'(i), ref_parity(11'(i))};
      for (int e = -1; e < 15; e++) begin
        cw_in = (e < 0) ? clean : clean ^ ham_cw_t'(1 << e);
        #1;
        // syndrome of a flip at codeword position e = column e of H
        exp_syn = (e < 0) ? 4'd0 : ref_parity(cw_in[14:4]) ^ cw_in[3:0];
        checks++;
        if (d_out !== 11'(i) || cw_out !== clean || err !== (e >= 0) || syn !== exp_syn) begin
          failures++;
          if (failures < 10)
            $display("FAIL d=%h e=%0d out=%h err=%b syn=%h", i, e, d_out, err, syn);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
