// tb_ham15_11_enc - exhaustive check of the Hamming (15,11) encoder.
// For all 2048 data words the check bits are compared with the rows of the
// parity-check matrix (aes_ref_pkg::ref_parity), and every non-zero
// codeword is checked to have weight 3 or more (minimum distance 3).
module tb_ham15_11_enc;
  import aes_ham_pkg::*;
  import aes_ref_pkg::*;

  int checks = 0, failures = 0;
  ham_data_t d;
  ham_par_t  p;
  ham_cw_t   cw;

  ham15_11_enc dut (.data_i(d), .parity_o(p), .cw_o(cw));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int minw;
    minw = 99;
    for (int i = 0; i < 2048; i++) begin
      d = 11'(i);
      #1;
      checks++;
      if (p !== ref_parity(d) || cw !== {d, ref_parity(d)}) begin
        failures++;
        $display("FAIL d=%h p=%h exp=%h", d, p, ref_parity(d));
      end
      if (i != 0 && $countones(cw) < minw) minw = $countones(cw);
    end
    checks++;
    if (minw != 3) begin
      failures++;
      $display("FAIL minimum codeword weight %0d, expected 3", minw);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
