// aes_ref_pkg: behavioural AES-128 reference for the testbenches.
//
// Written independently of the RTL cipher: the S-box is generated with the
// logarithm walk (p steps through powers of the generator 3, q through the
// powers of its inverse), the whole 44-word key schedule is expanded first,
// and the state is handled as a byte array. Also provides the CBC-MAC used by
// the security management unit for block hashes.
package aes_ref_pkg;

  typedef logic [7:0] bytes16_t [16];

  function automatic logic [7:0] r_rotl(input logic [7:0] x, input int n);
    return 8'((x << n) | (x >> (8 - n)));
  endfunction

  function automatic void make_sbox(output logic [7:0] sb [256]);
    logic [7:0] p, q, x;
    p = 8'h01; q = 8'h01;
    do begin
      p = p ^ 8'(p << 1) ^ (p[7] ? 8'h1b : 8'h00);
      q = q ^ 8'(q << 1);
      q = q ^ 8'(q << 2);
      q = q ^ 8'(q << 4);
      if (q[7]) q = q ^ 8'h09;
      x = q ^ r_rotl(q, 1) ^ r_rotl(q, 2) ^ r_rotl(q, 3) ^ r_rotl(q, 4);
      sb[p] = x ^ 8'h63;
    end while (p != 8'h01);
    sb[0] = 8'h63;
  endfunction

  function automatic logic [7:0] r_mul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] r;
    logic [7:0] x;
    r = 0; x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) r ^= x;
      x = 8'(x << 1) ^ (x[7] ? 8'h1b : 8'h00);
    end
    return r;
  endfunction

  function automatic void expand(input logic [127:0] key, input logic [7:0] sb [256],
                                 output logic [7:0] rk [176]);
    logic [7:0] t [4];
    logic [7:0] rc;
    logic [7:0] tmp;
    rc = 8'h01;
    for (int i = 0; i < 16; i++) rk[i] = key[127 - 8*i -: 8];
    for (int w = 4; w < 44; w++) begin
      for (int j = 0; j < 4; j++) t[j] = rk[4*(w-1) + j];
      if (w % 4 == 0) begin
        tmp = t[0]; t[0] = t[1]; t[1] = t[2]; t[2] = t[3]; t[3] = tmp;
        for (int j = 0; j < 4; j++) t[j] = sb[t[j]];
        t[0] ^= rc;
        rc = r_mul(rc, 8'h02);
      end
      for (int j = 0; j < 4; j++) rk[4*w + j] = rk[4*(w-4) + j] ^ t[j];
    end
  endfunction

  function automatic logic [127:0] encrypt(input logic [127:0] key, input logic [127:0] pt);
    logic [7:0] sb [256];
    logic [7:0] rk [176];
    logic [7:0] s [16];
    logic [7:0] u [16];
    logic [127:0] out;
    make_sbox(sb);
    expand(key, sb, rk);
    for (int i = 0; i < 16; i++) s[i] = pt[127 - 8*i -: 8] ^ rk[i];
    for (int r = 1; r <= 10; r++) begin
      for (int i = 0; i < 16; i++) s[i] = sb[s[i]];
      for (int c = 0; c < 4; c++) for (int w = 0; w < 4; w++) u[4*c + w] = s[4*((c + w) % 4) + w];
      if (r != 10)
        for (int c = 0; c < 4; c++)
          for (int w = 0; w < 4; w++)
            s[4*c + w] = r_mul(u[4*c + w], 8'h02) ^ r_mul(u[4*c + (w+1)%4], 8'h03)
                       ^ u[4*c + (w+2)%4] ^ u[4*c + (w+3)%4];
      else s = u;
      for (int i = 0; i < 16; i++) s[i] ^= rk[16*r + i];
    end
    for (int i = 0; i < 16; i++) out[127 - 8*i -: 8] = s[i];
    return out;
  endfunction

  function automatic logic [127:0] decrypt(input logic [127:0] key, input logic [127:0] ct);
    logic [7:0] sb [256];
    logic [7:0] isb [256];
    logic [7:0] rk [176];
    logic [7:0] s [16];
    logic [7:0] u [16];
    logic [127:0] out;
    make_sbox(sb);
    for (int i = 0; i < 256; i++) isb[sb[i]] = 8'(i);
    expand(key, sb, rk);
    for (int i = 0; i < 16; i++) s[i] = ct[127 - 8*i -: 8] ^ rk[160 + i];
    for (int r = 9; r >= 0; r--) begin
      for (int c = 0; c < 4; c++) for (int w = 0; w < 4; w++) u[4*((c + w) % 4) + w] = s[4*c + w];
      for (int i = 0; i < 16; i++) u[i] = isb[u[i]] ^ rk[16*r + i];
      if (r != 0)
        for (int c = 0; c < 4; c++)
          for (int w = 0; w < 4; w++)
            s[4*c + w] = r_mul(u[4*c + w], 8'h0e) ^ r_mul(u[4*c + (w+1)%4], 8'h0b)
                       ^ r_mul(u[4*c + (w+2)%4], 8'h0d) ^ r_mul(u[4*c + (w+3)%4], 8'h09);
      else s = u;
    end
    for (int i = 0; i < 16; i++) out[127 - 8*i -: 8] = s[i];
    return out;
  endfunction

  // CBC-MAC over 32-bit words: full 4-word chunks as they come, then one
  // final chunk holding the 0..3 leftover words, zeros, and the word count
  // in the last 32 bits. Word 0 of a chunk is its most significant word.
  function automatic logic [127:0] block_mac(input logic [127:0] key, input logic [31:0] words [],
                                             input int n);
    logic [127:0] h;
    logic [127:0] chunk;
    int k;
    h = '0; chunk = '0; k = 0;
    for (int i = 0; i < n; i++) begin
      chunk[127 - 32*k -: 32] = words[i];
      k++;
      if (k == 4) begin
        h = encrypt(key, h ^ chunk);
        chunk = '0; k = 0;
      end
    end
    chunk[31:0] = 32'(n);
    return encrypt(key, h ^ chunk);
  endfunction

endpackage
