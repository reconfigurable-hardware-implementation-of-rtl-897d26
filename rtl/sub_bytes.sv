// sub_bytes: SubBytes / InvSubBytes on the whole 128-bit state.
//
// Sixteen combinational S-boxes (sbox_comb), one per state byte, all switched
// together by inv. Byte i of the state is bits [127-8i -: 8]. Combinational.
module sub_bytes
  import aes_pkg::*;
(
  input  state_t s_in,
  input  logic   inv,
  output state_t s_out
);

  for (genvar i = 0; i < 16; i++) begin : g_sbox
    sbox_comb u_sbox (
      .x  (s_in[127-8*i -: 8]),
      .inv(inv),
      .y  (s_out[127-8*i -: 8])
    );
  end

endmodule
