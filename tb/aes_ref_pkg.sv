// aes_ref_pkg: reference model of AES-128 for the testbenches.
//
// Written independently of the RTL: the S-box is computed as the inverse in
// GF(2^8) (a^254 by square-and-multiply, modulo x^8+x^4+x^3+x+1) followed by
// the affine transform written with bit rotations; the inverse S-box is found
// by search. The cipher works on a 4x4 byte array st[row][col], loaded column
// by column from the 128-bit vector (byte 0 in bits 127:120).
package aes_ref_pkg;

  typedef logic [7:0] bt;
  typedef bt          st_t [4][4];

  function automatic bt ref_gmul(input bt a, input bt b);
    bt p = 0;
    bt x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= x;
      x = x[7] ? ((x << 1) ^ 8'h1b) : (x << 1);
    end
    return p;
  endfunction

  function automatic bt ref_ginv(input bt a);
    bt r = 8'h01;
    // a^254 = a^(2+4+8+16+32+64+128)
    bt sq = a;
    for (int i = 1; i < 8; i++) begin
      sq = ref_gmul(sq, sq);
      r  = ref_gmul(r, sq);
    end
    return (a == 0) ? 8'h00 : r;
  endfunction

  function automatic bt rotl8(input bt a, input int n);
    return bt'((a << n) | (a >> (8 - n)));
  endfunction

  function automatic bt ref_sbox(input bt a);
    bt i = ref_ginv(a);
    return i ^ rotl8(i, 1) ^ rotl8(i, 2) ^ rotl8(i, 3) ^ rotl8(i, 4) ^ 8'h63;
  endfunction

  function automatic bt ref_inv_sbox(input bt a);
    for (int v = 0; v < 256; v++) if (ref_sbox(bt'(v)) == a) return bt'(v);
    return 8'h00;
  endfunction

  function automatic st_t to_st(input logic [127:0] v);
    st_t s;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) s[r][c] = v[127 - 8*(4*c + r) -: 8];
    return s;
  endfunction

  function automatic logic [127:0] from_st(input st_t s);
    logic [127:0] v;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) v[127 - 8*(4*c + r) -: 8] = s[r][c];
    return v;
  endfunction

  function automatic logic [127:0] ref_sub(input logic [127:0] v, input bit inv);
    for (int i = 0; i < 16; i++)
      v[127-8*i -: 8] = inv ? ref_inv_sbox(v[127-8*i -: 8]) : ref_sbox(v[127-8*i -: 8]);
    return v;
  endfunction

  function automatic logic [127:0] ref_shift(input logic [127:0] v, input bit inv);
    st_t s = to_st(v);
    st_t t;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        if (inv) t[r][(c + r) % 4] = s[r][c];
        else     t[r][c] = s[r][(c + r) % 4];
    return from_st(t);
  endfunction

  function automatic logic [127:0] ref_mix(input logic [127:0] v, input bit inv);
    st_t s = to_st(v);
    st_t t;
    bt m [4][4];
    if (!inv) m = '{'{8'h02, 8'h03, 8'h01, 8'h01}, '{8'h01, 8'h02, 8'h03, 8'h01},
                    '{8'h01, 8'h01, 8'h02, 8'h03}, '{8'h03, 8'h01, 8'h01, 8'h02}};
    else      m = '{'{8'h0e, 8'h0b, 8'h0d, 8'h09}, '{8'h09, 8'h0e, 8'h0b, 8'h0d},
                    '{8'h0d, 8'h09, 8'h0e, 8'h0b}, '{8'h0b, 8'h0d, 8'h09, 8'h0e}};
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) begin
        t[r][c] = 0;
        for (int k = 0; k < 4; k++) t[r][c] ^= ref_gmul(m[r][k], s[k][c]);
      end
    return from_st(t);
  endfunction

  typedef logic [31:0] wd;
  typedef wd           sched_t [44];

  function automatic sched_t ref_expand(input logic [127:0] key);
    sched_t w;
    bt rc = 8'h01;
    for (int i = 0; i < 4; i++) w[i] = key[127-32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      wd t = w[i-1];
      if (i % 4 == 0) begin
        t = {t[23:0], t[31:24]};
        t = {ref_sbox(t[31:24]), ref_sbox(t[23:16]), ref_sbox(t[15:8]), ref_sbox(t[7:0])};
        t[31:24] ^= rc;
        rc = ref_gmul(rc, 8'h02);
      end
      w[i] = w[i-4] ^ t;
    end
    return w;
  endfunction

  function automatic logic [127:0] ref_rk(input sched_t w, input int r);
    return {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
  endfunction

  function automatic logic [127:0] ref_encrypt(input logic [127:0] key, input logic [127:0] pt);
    sched_t w = ref_expand(key);
    logic [127:0] s = pt ^ ref_rk(w, 0);
    for (int r = 1; r <= 10; r++) begin
      s = ref_shift(ref_sub(s, 0), 0);
      if (r != 10) s = ref_mix(s, 0);
      s ^= ref_rk(w, r);
    end
    return s;
  endfunction

  function automatic logic [127:0] ref_decrypt(input logic [127:0] key, input logic [127:0] ct);
    sched_t w = ref_expand(key);
    logic [127:0] s = ct ^ ref_rk(w, 10);
    for (int r = 9; r >= 0; r--) begin
      s = ref_sub(ref_shift(s, 1), 1);
      s ^= ref_rk(w, r);
      if (r != 0) s = ref_mix(s, 1);
    end
    return s;
  endfunction

endpackage
