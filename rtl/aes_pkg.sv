// aes_pkg: types, constants and small GF arithmetic helpers shared by the
// AES-128 crypto system.
//
// The state is a 128-bit vector holding 16 bytes in FIPS-197 order: byte i sits
// in bits [127-8i -: 8] and belongs to row i%4, column i/4. A round key is four
// 32-bit words w[4r..4r+3] laid out the same way (w[4r] in the top 32 bits).
//
// The GF helpers implement the tower field used by the combinational S-box:
// GF(2^2) with x^2+x+1, GF(2^4) = GF(2^2)[x]/(x^2+x+phi) with phi = {10}, and
// GF(2^8) = GF(2^4)[x]/(x^2+x+lambda) with lambda = {1100}. The tower and the
// constants are those of the published combinational Rijndael S-box this
// design follows; the GF(2^8) helper xtime uses the AES polynomial
// x^8+x^4+x^3+x+1.
package aes_pkg;

  localparam int unsigned NR = 10;  // rounds for a 128-bit key

  typedef logic [127:0] state_t;
  typedef logic [31:0]  word_t;
  typedef logic [7:0]   byte_t;

  // Multiply by x in GF(2^8) modulo x^8+x^4+x^3+x+1.
  function automatic byte_t xtime(input byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  // AES round constant for key-expansion group i (1..10), in the top byte.
  function automatic byte_t rcon(input logic [3:0] i);
    byte_t r;
    r = 8'h01;
    for (int k = 1; k < 10; k++)
      if (4'(k) < i) r = xtime(r);
    return r;
  endfunction

  // Multiply an 8x8 GF(2) matrix by a byte. rows[0] produces output bit 7 and
  // each row's MSB multiplies input bit 7, matching the printed matrices.
  function automatic byte_t gf2_matvec(input logic [7:0] rows [8], input byte_t a);
    byte_t b;
    for (int i = 0; i < 8; i++) b[7-i] = ^(rows[i] & a);
    return b;
  endfunction

  // ---- GF(2^2), polynomial x^2+x+1 ----
  function automatic logic [1:0] gf2_mul(input logic [1:0] q, input logic [1:0] w);
    return {(q[1] & w[1]) ^ (q[0] & w[1]) ^ (q[1] & w[0]),
            (q[1] & w[1]) ^ (q[0] & w[0])};
  endfunction

  // Multiply by phi = {10}.
  function automatic logic [1:0] gf2_mul_phi(input logic [1:0] q);
    return {q[1] ^ q[0], q[1]};
  endfunction

  // Inverse in GF(2^2) equals squaring: {q1, q1^q0}.
  function automatic logic [1:0] gf2_inv(input logic [1:0] q);
    return {q[1], q[1] ^ q[0]};
  endfunction

  // ---- GF(2^4) as GF(2^2)[x]/(x^2+x+phi) ----
  function automatic logic [3:0] gf4_mul(input logic [3:0] q, input logic [3:0] w);
    logic [1:0] ll;
    ll = gf2_mul(q[1:0], w[1:0]);
    return {gf2_mul(q[3:2] ^ q[1:0], w[3:2] ^ w[1:0]) ^ ll,
            gf2_mul_phi(gf2_mul(q[3:2], w[3:2])) ^ ll};
  endfunction

  // Squaring in GF(2^4) (linear).
  function automatic logic [3:0] gf4_sq(input logic [3:0] q);
    return {q[3], q[3] ^ q[2], q[2] ^ q[1], q[3] ^ q[1] ^ q[0]};
  endfunction

  // Multiply by lambda = {1100} (linear).
  function automatic logic [3:0] gf4_mul_lambda(input logic [3:0] q);
    return {q[2] ^ q[0], q[3] ^ q[2] ^ q[1] ^ q[0], q[3], q[2]};
  endfunction

  // Inverse in GF(2^4): (hx+l)^-1 = h*e^-1 x + (h+l)*e^-1,
  // e = phi*h^2 + l*(h+l); the inverse of 0 is 0.
  function automatic logic [3:0] gf4_inv(input logic [3:0] q);
    logic [1:0] h, l, e, ei;
    h  = q[3:2];
    l  = q[1:0];
    e  = gf2_mul_phi(gf2_mul(h, h)) ^ gf2_mul(l, h ^ l);
    ei = gf2_inv(e);
    return {gf2_mul(h, ei), gf2_mul(h ^ l, ei)};
  endfunction

endpackage
