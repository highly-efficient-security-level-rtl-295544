// aes_ref_pkg - reference models used by the testbenches.
//
// A plain behavioural AES-128 written independently of the RTL: the S-box
// comes from log / antilog tables over the generator 0x03 (not from the
// x^254 inversion the RTL uses), the state is a flat 128-bit vector with
// byte k at bits [127-8k -: 8], and MixColumns uses full GF(2^8)
// multiplication. The Hamming (15,11) check bits are computed from the four
// rows of the parity-check matrix H = [P^T | I4], written out as masks over
// the data bits.
package aes_ref_pkg;

  // rows of H over the 11 data bits (bit i = data bit i)
  localparam logic [10:0] H_ROW [4] = '{11'h55B, 11'h66D, 11'h78E, 11'h7F0};

  function automatic logic [3:0] ref_parity(input logic [10:0] d);
    logic [3:0] p;
    for (int j = 0; j < 4; j++) p[j] = ^(d & H_ROW[j]);
    return p;
  endfunction

  function automatic logic [63:0] ref_state_parity(input logic [127:0] s);
    logic [63:0] c;
    for (int k = 0; k < 16; k++)
      c[63-4*k -: 4] = ref_parity({3'b000, s[127-8*k -: 8]});
    return c;
  endfunction

  function automatic logic [7:0] gmul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] p;
    logic [7:0] aa, bb;
    p = 0; aa = a; bb = b;
    while (bb != 0) begin
      if (bb[0]) p ^= aa;
      aa = (aa << 1) ^ (aa[7] ? 8'h1b : 8'h00);
      bb >>= 1;
    end
    return p;
  endfunction

  function automatic logic [7:0] ref_sbox(input logic [7:0] a);
    logic [7:0] alog [256];
    logic [7:0] lg   [256];
    logic [7:0] x, inv, s;
    x = 8'h01;
    for (int i = 0; i < 255; i++) begin
      alog[i] = x;
      lg[x]   = 8'(i);
      x = gmul(x, 8'h03);
    end
    if (a == 0) inv = 0;
    else inv = alog[(255 - int'(lg[a])) % 255];
    // affine map as s = inv ^ rotl1 ^ rotl2 ^ rotl3 ^ rotl4 ^ 0x63
    s = inv ^ {inv[6:0], inv[7]} ^ {inv[5:0], inv[7:6]}
            ^ {inv[4:0], inv[7:5]} ^ {inv[3:0], inv[7:4]} ^ 8'h63;
    return s;
  endfunction

  function automatic logic [7:0] gb(input logic [127:0] s, input int k);
    return s[127-8*k -: 8];
  endfunction

  function automatic logic [127:0] ref_sub_bytes(input logic [127:0] s);
    logic [127:0] o;
    for (int k = 0; k < 16; k++) o[127-8*k -: 8] = ref_sbox(gb(s, k));
    return o;
  endfunction

  function automatic logic [127:0] ref_shift_rows(input logic [127:0] s);
    logic [127:0] o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[127-8*(4*c+r) -: 8] = gb(s, 4*((c+r)%4) + r);
    return o;
  endfunction

  function automatic logic [127:0] ref_mix_columns(input logic [127:0] s);
    logic [127:0] o;
    logic [7:0] a [4];
    for (int c = 0; c < 4; c++) begin
      for (int r = 0; r < 4; r++) a[r] = gb(s, 4*c + r);
      o[127-8*(4*c+0) -: 8] = gmul(a[0],2) ^ gmul(a[1],3) ^ a[2] ^ a[3];
      o[127-8*(4*c+1) -: 8] = a[0] ^ gmul(a[1],2) ^ gmul(a[2],3) ^ a[3];
      o[127-8*(4*c+2) -: 8] = a[0] ^ a[1] ^ gmul(a[2],2) ^ gmul(a[3],3);
      o[127-8*(4*c+3) -: 8] = gmul(a[0],3) ^ a[1] ^ a[2] ^ gmul(a[3],2);
    end
    return o;
  endfunction

  // next round key from the current one and the round constant
  function automatic logic [127:0] ref_next_key(input logic [127:0] k, input logic [7:0] rcon);
    logic [31:0] w [4];
    logic [31:0] t;
    for (int i = 0; i < 4; i++) w[i] = k[127-32*i -: 32];
    t = {ref_sbox(w[3][23:16]) ^ rcon, ref_sbox(w[3][15:8]),
         ref_sbox(w[3][7:0]), ref_sbox(w[3][31:24])};
    w[0] ^= t;
    w[1] ^= w[0];
    w[2] ^= w[1];
    w[3] ^= w[2];
    return {w[0], w[1], w[2], w[3]};
  endfunction

  function automatic logic [7:0] ref_rcon(input int round);  // round 1..10
    logic [7:0] r;
    r = 8'h01;
    for (int i = 1; i < round; i++) r = gmul(r, 8'h02);
    return r;
  endfunction

  function automatic logic [127:0] ref_aes128(input logic [127:0] pt, input logic [127:0] key);
    logic [127:0] s, k;
    k = key;
    s = pt ^ k;
    for (int r = 1; r <= 10; r++) begin
      k = ref_next_key(k, ref_rcon(r));
      s = ref_shift_rows(ref_sub_bytes(s));
      if (r != 10) s = ref_mix_columns(s);
      s = s ^ k;
    end
    return s;
  endfunction

  function automatic logic [127:0] rand128();
    return {$urandom(), $urandom(), $urandom(), $urandom()};
  endfunction

endpackage
