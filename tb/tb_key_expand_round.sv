// tb_key_expand_round - checks one key-schedule round.
// The FIPS-197 appendix A.1 key 2b7e1516... is expanded ten times; the
// first and last round keys are compared with the published values and
// every round key, and its check bits, with the reference key schedule.
// Random keys with random round constants follow.
module tb_key_expand_round;
  import aes_ham_pkg::*;
  import aes_ref_pkg::*;

  int checks = 0, failures = 0;
  state_t k_in, k_out;
  logic [7:0] rcon;
  chk_t   kc_out;

  key_expand_round dut (.rkey_i(k_in), .rcon_i(rcon), .rkey_o(k_out), .rkey_chk_o(kc_out));

  task automatic expect_eq(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s in=%h out=%h", what, k_in, k_out);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] k, exp_k;
    k = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    for (int r = 1; r <= 10; r++) begin
      k_in = k; rcon = ref_rcon(r); #1;
      exp_k = ref_next_key(k, rcon);
      expect_eq("schedule", k_out == exp_k && kc_out == ref_state_parity(exp_k));
      if (r == 1)  expect_eq("round 1 key",  k_out == 128'ha0fafe1788542cb123a339392a6c7605);
      if (r == 10) expect_eq("round 10 key", k_out == 128'hd014f9a8c9ee2589e13f0cc8b6630ca6);
      k = k_out;
    end
    for (int t = 0; t < 200; t++) begin
      k = rand128();
      rcon = 8'($urandom);
      k_in = k; #1;
      exp_k = ref_next_key(k, rcon);
      expect_eq("random", k_out == exp_k && kc_out == ref_state_parity(exp_k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
