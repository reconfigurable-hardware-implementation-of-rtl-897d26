// sbox_comb: AES S-box and inverse S-box in combinational logic, no lookup ROM.
//
// Forward (inv = 0): x -> delta -> inverse in GF((2^4)^2) -> delta^-1 -> AT.
// Inverse (inv = 1): x -> AT^-1 -> delta -> inverse -> delta^-1.
// The multiplicative-inverse stage and both mappings are shared between the
// two directions; multiplexers at the input and output select the affine
// stage. This is the S-box structure the design is built around; sharing it
// through an inv select is this design's choice. No clock: the output follows
// the input after the gate delay.
module sbox_comb
  import aes_pkg::*;
(
  input  byte_t x,
  input  logic  inv,
  output byte_t y
);

  byte_t at_inv_out, to_field, field_in, field_out, from_field, at_out;

  affine_transform #(.INVERSE(1'b1)) u_at_inv (.a(x), .b(at_inv_out));

  assign to_field = inv ? at_inv_out : x;

  isomap #(.INVERSE(1'b0)) u_delta     (.q(to_field),  .y(field_in));
  gf_mul_inverse           u_inverse   (.q(field_in),  .y(field_out));
  isomap #(.INVERSE(1'b1)) u_delta_inv (.q(field_out), .y(from_field));

  affine_transform #(.INVERSE(1'b0)) u_at (.a(from_field), .b(at_out));

  assign y = inv ? from_field : at_out;

endmodule
