// add_round_key: AddRoundKey, the bitwise XOR of the 128-bit state with the
// 128-bit round key w[4r..4r+3]. It is the only step that uses the key. The
// same operation serves encryption and decryption. Combinational.
module add_round_key
  import aes_pkg::*;
(
  input  state_t s_in,
  input  state_t round_key,
  output state_t s_out
);

  assign s_out = s_in ^ round_key;

endmodule
