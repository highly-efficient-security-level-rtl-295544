// tb_sub_bytes - checks SubBytes and its Hamming protection.
// All 256 S-box entries (16 vectors) and random states are compared with
// the reference S-box; the check bits must match the reference parity of
// the output. Single-bit faults injected on the raw S-box output must be
// corrected and flagged; a double fault in one byte must be flagged
// uncorrectable.
module tb_sub_bytes;
  import aes_ham_pkg::*;
  import aes_ref_pkg::*;

  int checks = 0, failures = 0;
  state_t s_in, fault, s_out;
  chk_t   c_out, syn;
  logic   err, uncorr;
  logic [4:0] nerr;

  sub_bytes dut (.state_i(s_in), .fault_i(fault), .state_o(s_out), .chk_o(c_out),
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
    fault = '0;
    s_in  = '0; #1;
    expect_eq("S(00)=63", s_out[0] == 8'h63);
    s_in[3] = 8'h53; #1;
    expect_eq("S(53)=ED", s_out[3] == 8'hED);
    for (int t = 0; t < 16; t++) begin
      for (int k = 0; k < 16; k++) s[127-8*k -: 8] = 8'(16*t + k);
      s_in = s; #1;
      exp_o = ref_sub_bytes(s);
      expect_eq("table", s_out == exp_o && c_out == ref_state_parity(exp_o) && !err);
    end
    for (int t = 0; t < 100; t++) begin
      s = rand128();
      exp_o = ref_sub_bytes(s);
      s_in = s; fault = '0; #1;
      expect_eq("random", s_out == exp_o && c_out == ref_state_parity(exp_o) && !err);
      m = '0;
      m[$urandom_range(0, 127)] = 1'b1;
      fault = m; #1;
      expect_eq("fault corrected", s_out == exp_o && err && !uncorr && nerr == 1);
    end
    // two faults in byte 2 (bits 7 and 0): not correctable
    s = rand128();
    s_in = s;
    m = '0; m[127-16] = 1'b1; m[127-23] = 1'b1;
    fault = m; #1;
    expect_eq("double fault flagged", err && uncorr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
