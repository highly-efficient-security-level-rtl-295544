// tb_mix_columns - checks mix_columns and its Hamming protection.
// Random states with reference check bits are compared with the reference
// model (ref_mix_columns); the output check bits must equal the reference parity
// of the output. A single-bit fault on the raw output must be corrected
// and flagged; a single flipped input check bit (a fault in the carried
// check bits) must be flagged without changing the data.
module tb_mix_columns;
  import aes_ham_pkg::*;
  import aes_ref_pkg::*;

  int checks = 0, failures = 0;
  state_t s_in, fault, s_out;
  chk_t   c_in, c_out, syn;
  logic   err, uncorr;
  logic [4:0] nerr;

  mix_columns dut (.state_i(s_in), .chk_i(c_in), .fault_i(fault), .state_o(s_out), .chk_o(c_out),
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
    // FIPS-197 style column example: db 13 53 45 -> 8e 4d a1 bc
    s = {32'hdb135345, 32'hf20a225c, 32'h01010101, 32'hc6c6c6c6};
    s_in = s; c_in = ref_state_parity(s); #1;
    expect_eq("known columns", s_out == {32'h8e4da1bc, 32'h9fdc589d, 32'h01010101, 32'hc6c6c6c6} && !err);
    for (int t = 0; t < 200; t++) begin
      s = rand128();
      exp_o = ref_mix_columns(s);
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
