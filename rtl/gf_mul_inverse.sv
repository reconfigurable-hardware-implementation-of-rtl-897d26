// gf_mul_inverse: multiplicative inverse in the composite field GF((2^4)^2).
//
// The input is b*x + c with b = q[7:4] and c = q[3:0] over GF(2^4), reduced by
// x^2 + x + lambda (lambda = {1100}). The inverse is
//   (b*x + c)^-1 = b*d^-1 * x + (b + c)*d^-1,  d = lambda*b^2 + c*(b + c),
// so one GF(2^8) inversion becomes a GF(2^4) inversion plus three GF(2^4)
// multiplications, squaring and a constant multiply, all small XOR/AND
// networks (see aes_pkg). Zero maps to zero, as the S-box requires. Purely
// combinational; the field choices follow the published combinational S-box.
module gf_mul_inverse
  import aes_pkg::*;
(
  input  byte_t q,
  output byte_t y
);

  logic [3:0] b, c, d, d_inv;

  always_comb begin
    b     = q[7:4];
    c     = q[3:0];
    d     = gf4_mul_lambda(gf4_sq(b)) ^ gf4_mul(c, b ^ c);
    d_inv = gf4_inv(d);
    y     = {gf4_mul(b, d_inv), gf4_mul(b ^ c, d_inv)};
  end

endmodule
