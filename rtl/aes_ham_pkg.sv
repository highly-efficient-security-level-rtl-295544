// aes_ham_pkg - types, constants and functions shared by the AES-128 /
// Hamming(15,11) encryptor.
//
// The AES state is held as 16 bytes in FIPS-197 input order: byte k of the
// state (row k%4, column k/4) is bits [127-8k -: 8] of the 128-bit block.
// The packed type state_t = logic [0:15][7:0] gives exactly that order, so
// s[k] is byte k. The ascending packed range is deliberate: it keeps the
// byte numbering of the AES specification in every index expression.
//
// Every state byte carries 4 Hamming check bits. The code is the systematic
// Hamming (15,11) code; a state byte occupies data bits d[7:0] and the
// data bits d[10:8] are always zero (a shortened use of the (15,11) code, a
// choice of this design, since the byte is the unit the transformations
// work on). The parity part P of the generator matrix G = [I | P] gives
// each data bit d[i] the 4-bit column HAM_P[i]; the check bits are the XOR
// of the columns of all data bits that are 1. The columns are the eleven
// 4-bit values of weight two or more, so H = [P^T | I4] has 15 distinct
// non-zero columns and a single flipped bit is located by its syndrome.
//
// The S-box is built at elaboration time: multiplicative inverse in
// GF(2^8) (x^254, polynomial x^8+x^4+x^3+x+1) followed by the FIPS-197
// affine transform.
package aes_ham_pkg;

  localparam int unsigned NB_BYTES   = 16;   // bytes in an AES block
  localparam int unsigned NUM_ROUNDS = 10;   // AES-128 rounds
  localparam int unsigned HAM_N      = 15;   // Hamming code length
  localparam int unsigned HAM_K      = 11;   // Hamming data bits
  localparam int unsigned HAM_P_BITS = HAM_N - HAM_K;  // 4 check bits
  localparam int unsigned CYCLES_PER_BLOCK = NUM_ROUNDS + 2;  // load + 10 rounds + output

  typedef logic [0:15][7:0]            state_t;  // AES state, byte 0 first (MSBs)
  typedef logic [0:15][HAM_P_BITS-1:0] chk_t;    // 4 check bits per state byte
  typedef logic [HAM_K-1:0]            ham_data_t;
  typedef logic [HAM_P_BITS-1:0]       ham_par_t;
  typedef logic [HAM_N-1:0]            ham_cw_t; // {data[10:0], parity[3:0]}

  // Column of the parity matrix P for data bit i (i = 0..10).
  localparam ham_par_t HAM_P [HAM_K] = '{
    4'b0011, 4'b0101, 4'b0110, 4'b0111, 4'b1001, 4'b1010,
    4'b1011, 4'b1100, 4'b1101, 4'b1110, 4'b1111
  };

  // Check bits of an 11-bit data word: XOR of the P columns of set bits.
  function automatic ham_par_t ham_parity(input ham_data_t d);
    ham_par_t p;
    p = '0;
    for (int i = 0; i < HAM_K; i++)
      if (d[i]) p ^= HAM_P[i];
    return p;
  endfunction

  // Check bits of one state byte (data bits 10:8 are zero).
  function automatic ham_par_t ham_parity8(input logic [7:0] b);
    return ham_parity({3'b000, b});
  endfunction

  // Check bits of a whole state.
  function automatic chk_t state_parity(input state_t s);
    chk_t c;
    for (int k = 0; k < NB_BYTES; k++) c[k] = ham_parity8(s[k]);
    return c;
  endfunction

  // Multiply by x in GF(2^8).
  function automatic logic [7:0] xtime(input logic [7:0] a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  // General multiply in GF(2^8), used only to build constant tables.
  function automatic logic [7:0] gf_mul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] r, x;
    r = '0;
    x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) r ^= x;
      x = xtime(x);
    end
    return r;
  endfunction

  // S-box entry: inverse (a^254, 0 maps to 0) then the affine transform.
  function automatic logic [7:0] sbox_calc(input logic [7:0] a);
    logic [7:0] inv, sq, y;
    inv = 8'h01;
    sq  = a;
    // 254 = 0b1111_1110: multiply a^2, a^4, ..., a^128
    for (int i = 1; i < 8; i++) begin
      sq  = gf_mul(sq, sq);
      inv = gf_mul(inv, sq);
    end
    for (int i = 0; i < 8; i++)
      y[i] = inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8];
    return y ^ 8'h63;
  endfunction

  typedef logic [7:0] sbox_tab_t [256];
  typedef ham_par_t   par_tab_t  [256];

  function automatic sbox_tab_t make_sbox();
    sbox_tab_t t;
    for (int i = 0; i < 256; i++) t[i] = sbox_calc(8'(i));
    return t;
  endfunction

  // Pre-calculated Hamming check bits of each S-box output, indexed by
  // the S-box input (the table the SubBytes checker predicts from).
  function automatic par_tab_t make_sbox_par();
    par_tab_t t;
    for (int i = 0; i < 256; i++) t[i] = ham_parity8(sbox_calc(8'(i)));
    return t;
  endfunction

  // Fault-injection point selector (a test hook; see lst_aes_ham_top).
  typedef enum logic [2:0] {
    INJ_NONE      = 3'd0,
    INJ_STATE_REG = 3'd1,
    INJ_KEY_REG   = 3'd2,
    INJ_SUB_BYTES = 3'd3,
    INJ_SHIFT_ROWS= 3'd4,
    INJ_MIX_COLS  = 3'd5,
    INJ_ADD_RKEY  = 3'd6
  } inj_sel_e;

endpackage
