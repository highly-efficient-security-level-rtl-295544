// tb_shift_rows - checks shift_rows and its Hamming protection.
// Random states with reference check bits are compared with the reference
// model (ref_shift_rows); the output check bits must equal the reference parity
// of the output. A single-bit fault on the raw output must be corrected
// and flagged; a single flipped input check bit (a fault in the carried
// check bits) must be flagged without changing the data.
module tb_shift_rows;
  import aes_ham_pkg::*;
  import aes_ref_pkg::*;

  int checks = 0, failures = 0;
  state_t s_in, fault, s_out;
  chk_t   c_in, c_out, syn;
  logic   err, uncorr;
  logic [4:0] nerr;

  shift_rows dut (.state_i(s_in), .chk_i(c_in), .fault_i(fault), .state_o(s_out), .chk_o(c_out),
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
    logic [127:0] s, exp_o, m;
    logic [63:0]  cm;
    fault = '0;
    // byte k holds k: rows rotate left by their index
    s = 128'h000102030405060708090a0b0c0d0e0f;
    s_in = s; c_in = ref_state_parity(s); #1;
    expect_eq("known permutation", s_out == 128'h00050a0f04090e03080d02070c01060b && !err);
    for (int t = 0; t < 200; t++) begin
      s = rand128();
      exp_o = ref_shift_rows(s);
      s_in = s; c_in = ref_state_parity(s); fault = '0; #1;
      expect_eq("random", s_out == exp_o && c_out == ref_state_parity(exp_o) && !err && !uncorr);
      m = '0;
      m[$urandom_range(0, 127)] = 1'b1;
      fault = m; #1;
      expect_eq("fault corrected", s_out == exp_o && c_out == ref_state_parity(exp_o) && err && nerr == 1);
      fault = '0;
      cm = '0;
      cm[$urandom_range(0, 63)] = 1'b1;
      c_in = ref_state_parity(s) ^ cm; #1;
      expect_eq("check-bit fault flagged", s_out == exp_o && err && nerr >= 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
