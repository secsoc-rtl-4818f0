// aes_pkg: AES-128 (FIPS-197) round functions shared by the cipher core.
//
// The S-box is not stored as a literal table. It is computed at elaboration:
// S(x) = A(x^-1) ^ 8'h63, where x^-1 is the inverse in GF(2^8) modulo
// x^8+x^4+x^3+x+1 (0 maps to 0), obtained as x^254, and A is the affine map
// v ^ rotl(v,1) ^ rotl(v,2) ^ rotl(v,3) ^ rotl(v,4). The inverse table is
// built by inverting that permutation. Hardware sees two 256-entry ROMs.
//
// Block layout follows FIPS-197: byte 0 of the state is bits [127:120],
// bytes fill the 4x4 state column by column (byte b is row b%4, column b/4).
// The 128-bit AES block size and key size are those of the design; the
// choice of a per-round iterative datapath is made in aes128_core.
package aes_pkg;

  typedef logic [127:0] block_t;

  function automatic logic [7:0] xtime(input logic [7:0] a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic logic [7:0] gf_mul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] p;
    logic [7:0] aa;
    p  = '0;
    aa = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p = p ^ aa;
      aa = xtime(aa);
    end
    return p;
  endfunction

  // a^254 = a^(2+4+8+16+32+64+128): the multiplicative inverse, 0 -> 0
  function automatic logic [7:0] gf_inv(input logic [7:0] a);
    logic [7:0] r;
    logic [7:0] sq;
    r  = 8'h01;
    sq = a;
    for (int i = 1; i < 8; i++) begin
      sq = gf_mul(sq, sq);
      r  = gf_mul(r, sq);
    end
    return r;
  endfunction

  function automatic logic [7:0] rotl8(input logic [7:0] x, input int n);
    return 8'((x << n) | (x >> (8 - n)));
  endfunction

  function automatic logic [7:0] sbox_calc(input logic [7:0] x);
    logic [7:0] v;
    v = gf_inv(x);
    return v ^ rotl8(v, 1) ^ rotl8(v, 2) ^ rotl8(v, 3) ^ rotl8(v, 4) ^ 8'h63;
  endfunction

  function automatic logic [2047:0] gen_sbox();
    logic [2047:0] t;
    t = '0;
    for (int i = 0; i < 256; i++) t[i*8 +: 8] = sbox_calc(8'(i));
    return t;
  endfunction

  function automatic logic [2047:0] gen_inv_sbox();
    logic [2047:0] t;
    logic [7:0]    s;
    t = '0;
    for (int i = 0; i < 256; i++) begin
      s = sbox_calc(8'(i));
      t[s*8 +: 8] = 8'(i);
    end
    return t;
  endfunction

  localparam logic [2047:0] SBOX_TBL     = gen_sbox();
  localparam logic [2047:0] INV_SBOX_TBL = gen_inv_sbox();

  function automatic logic [7:0] sbox(input logic [7:0] x);
    return SBOX_TBL[x*8 +: 8];
  endfunction

  function automatic logic [7:0] inv_sbox(input logic [7:0] x);
    return INV_SBOX_TBL[x*8 +: 8];
  endfunction

  // byte b of the state (b = 0 is the most significant byte)
  function automatic logic [7:0] get_b(input block_t s, input int b);
    return s[127 - 8*b -: 8];
  endfunction

  function automatic block_t sub_bytes(input block_t s);
    block_t r;
    for (int b = 0; b < 16; b++) r[127 - 8*b -: 8] = sbox(get_b(s, b));
    return r;
  endfunction

  function automatic block_t inv_sub_bytes(input block_t s);
    block_t r;
    for (int b = 0; b < 16; b++) r[127 - 8*b -: 8] = inv_sbox(get_b(s, b));
    return r;
  endfunction

  // row r is rotated left by r columns
  function automatic block_t shift_rows(input block_t s);
    block_t r;
    for (int c = 0; c < 4; c++)
      for (int row = 0; row < 4; row++)
        r[127 - 8*(row + 4*c) -: 8] = get_b(s, row + 4*((c + row) % 4));
    return r;
  endfunction

  function automatic block_t inv_shift_rows(input block_t s);
    block_t r;
    for (int c = 0; c < 4; c++)
      for (int row = 0; row < 4; row++)
        r[127 - 8*(row + 4*((c + row) % 4)) -: 8] = get_b(s, row + 4*c);
    return r;
  endfunction

  function automatic block_t mix_columns(input block_t s);
    block_t r;
    logic [7:0] a0, a1, a2, a3;
    for (int c = 0; c < 4; c++) begin
      a0 = get_b(s, 4*c); a1 = get_b(s, 4*c+1); a2 = get_b(s, 4*c+2); a3 = get_b(s, 4*c+3);
      r[127 - 8*(4*c)   -: 8] = xtime(a0) ^ (xtime(a1) ^ a1) ^ a2 ^ a3;
      r[127 - 8*(4*c+1) -: 8] = a0 ^ xtime(a1) ^ (xtime(a2) ^ a2) ^ a3;
      r[127 - 8*(4*c+2) -: 8] = a0 ^ a1 ^ xtime(a2) ^ (xtime(a3) ^ a3);
      r[127 - 8*(4*c+3) -: 8] = (xtime(a0) ^ a0) ^ a1 ^ a2 ^ xtime(a3);
    end
    return r;
  endfunction

  function automatic block_t inv_mix_columns(input block_t s);
    block_t r;
    logic [7:0] a0, a1, a2, a3;
    for (int c = 0; c < 4; c++) begin
      a0 = get_b(s, 4*c); a1 = get_b(s, 4*c+1); a2 = get_b(s, 4*c+2); a3 = get_b(s, 4*c+3);
      r[127 - 8*(4*c)   -: 8] = gf_mul(a0, 8'h0e) ^ gf_mul(a1, 8'h0b) ^ gf_mul(a2, 8'h0d) ^ gf_mul(a3, 8'h09);
      r[127 - 8*(4*c+1) -: 8] = gf_mul(a0, 8'h09) ^ gf_mul(a1, 8'h0e) ^ gf_mul(a2, 8'h0b) ^ gf_mul(a3, 8'h0d);
      r[127 - 8*(4*c+2) -: 8] = gf_mul(a0, 8'h0d) ^ gf_mul(a1, 8'h09) ^ gf_mul(a2, 8'h0e) ^ gf_mul(a3, 8'h0b);
      r[127 - 8*(4*c+3) -: 8] = gf_mul(a0, 8'h0b) ^ gf_mul(a1, 8'h0d) ^ gf_mul(a2, 8'h09) ^ gf_mul(a3, 8'h0e);
    end
    return r;
  endfunction

  // round constant of key-expansion round rnd (1..10): x^(rnd-1) in GF(2^8)
  function automatic logic [7:0] rcon(input logic [3:0] rnd);
    logic [7:0] v;
    v = 8'h01;
    for (int i = 1; i < 10; i++)
      if (i < int'(rnd)) v = xtime(v);
    return v;
  endfunction

  function automatic logic [31:0] sub_rot_word(input logic [31:0] w);
    logic [31:0] r;
    r = {w[23:0], w[31:24]};
    return {sbox(r[31:24]), sbox(r[23:16]), sbox(r[15:8]), sbox(r[7:0])};
  endfunction

  // round key rnd from round key rnd-1
  function automatic block_t key_step(input block_t k, input logic [3:0] rnd);
    logic [31:0] w0, w1, w2, w3;
    w0 = k[127:96] ^ sub_rot_word(k[31:0]) ^ {rcon(rnd), 24'h0};
    w1 = k[95:64] ^ w0;
    w2 = k[63:32] ^ w1;
    w3 = k[31:0]  ^ w2;
    return {w0, w1, w2, w3};
  endfunction

  // round key rnd-1 from round key rnd
  function automatic block_t inv_key_step(input block_t k, input logic [3:0] rnd);
    logic [31:0] w0, w1, w2, w3;
    w3 = k[31:0]  ^ k[63:32];
    w2 = k[63:32] ^ k[95:64];
    w1 = k[95:64] ^ k[127:96];
    w0 = k[127:96] ^ sub_rot_word(w3) ^ {rcon(rnd), 24'h0};
    return {w0, w1, w2, w3};
  endfunction

endpackage
