// tb_ham_state_check - checks the 16-byte Hamming checker.
// Random states with reference check bits: clean input passes unchanged;
// one flipped data or check bit in any subset of bytes is corrected and
// counted; a double error whose syndrome names an unused data bit (bits 0
// and 7 of a byte: syndrome 0011^1100 = 1111, the column of data bit 10)
// is flagged uncorrectable and left unchanged.
module tb_ham_state_check;
  import aes_ham_pkg::*;
  import aes_ref_pkg::*;

  int checks = 0, failures = 0;
  state_t s_in, s_out;
  chk_t   c_in, c_out, syn;
  logic   err, uncorr;
  logic [4:0] nerr;

  ham_state_check dut (.state_i(s_in), .chk_i(c_in), .state_o(s_out), .chk_o(c_out),
                       .err_o(err), .uncorr_o(uncorr), .nerr_o(nerr), .syndrome_o(syn));

  task automatic expect_eq(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] s, m;
    logic [63:0]  c, cm;
    int nflip;
    for (int t = 0; t < 400; t++) begin
      s = rand128();
      c = ref_state_parity(s);
      // clean
      s_in = s; c_in = c; #1;
      expect_eq("clean", s_out == s && c_out == c && !err && !uncorr && nerr == 0);
      // single flips in random bytes, in data or check bits
      m = '0; cm = '0; nflip = 0;
      for (int k = 0; k < 16; k++) begin
        if ($urandom_range(0, 2) == 0) begin
          nflip++;
          if ($urandom_range(0, 3) == 0) cm[63-4*k - $urandom_range(0, 3)] = 1'b1;
          else                            m[127-8*k - $urandom_range(0, 7)] = 1'b1;
        end
      end
      s_in = s ^ m; c_in = c ^ cm; #1;
      expect_eq("corrected", s_out == s && c_out == c && !uncorr && err == (nflip != 0)
                             && nerr == 5'(nflip));
    end
    // uncorrectable double error in byte 5
    s = rand128();
    c = ref_state_parity(s);
    m = '0;
    m[127-8*5 - 0] = 1'b1;   // bit 7 of byte 5
    m[127-8*5 - 7] = 1'b1;   // bit 0 of byte 5
    s_in = s ^ m; c_in = c; #1;
    expect_eq("uncorrectable", err && uncorr && s_out == (s ^ m) && nerr == 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
