// tb_add_round_key - checks AddRoundKey and its Hamming protection.
// Random state and key with reference check bits: the output must be the
// XOR and carry the reference parity; a single-bit fault on the raw output
// must be corrected and flagged.
module tb_add_round_key;
  import aes_ham_pkg::*;
  import aes_ref_pkg::*;

  int checks = 0, failures = 0;
  state_t s_in, k_in, fault, s_out;
  chk_t   c_in, kc_in, c_out, syn;
  logic   err, uncorr;
  logic [4:0] nerr;

  add_round_key dut (.state_i(s_in), .chk_i(c_in), .rkey_i(k_in), .rkey_chk_i(kc_in),
                     .fault_i(fault), .state_o(s_out), .chk_o(c_out),
                     .err_o(err), .uncorr_o(uncorr), .nerr_o(nerr), .syndrome_o(syn));

  task automatic expect_eq(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s in=%h out=%h", what, s_in, s_out);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] s, k, exp_o, m;
    for (int t = 0; t < 300; t++) begin
      s = rand128();
      k = rand128();
      exp_o = s ^ k;
      s_in = s; c_in = ref_state_parity(s); k_in = k; kc_in = ref_state_parity(k);
      fault = '0; #1;
      expect_eq("xor", s_out == exp_o && c_out == ref_state_parity(exp_o) && !err);
      m = '0;
      m[$urandom_range(0, 127)] = 1'b1;
      fault = m; #1;
      expect_eq("fault corrected", s_out == exp_o && err && !uncorr && nerr == 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
