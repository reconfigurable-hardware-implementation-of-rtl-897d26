// round_datapath: one AES round, encryption or decryption, in combinational
// logic.
//
// Encryption (inv = 0):  s -> SubBytes -> ShiftRows -> MixColumns -> AddRoundKey
// Decryption (inv = 1):  s -> InvShiftRows -> InvSubBytes -> AddRoundKey
//                          -> InvMixColumns
// In the last round (last = 1) the (Inv)MixColumns stage is bypassed, as the
// final AES round has no column mixing. One bank of 16 S-boxes and one
// MixColumns unit serve both directions. Because a byte-wise substitution
// commutes with a byte permutation, the S-boxes always come first and the
// (inverse) row shift second. The key is added before InvMixColumns when
// decrypting and after MixColumns when encrypting, so there are two XOR banks
// and the mixer input is multiplexed; this keeps the datapath free of
// combinational loops. The inverse order is the standard AES inverse cipher;
// sharing the hardware between directions is this design's choice.
module round_datapath
  import aes_pkg::*;
(
  input  state_t s_in,
  input  state_t round_key,
  input  logic   inv,
  input  logic   last,
  output state_t s_out
);

  state_t sb_out, sr_out, mc_in, mc_out, enc_ark_in, enc_ark_out, dec_ark_out;

  sub_bytes  u_sub   (.s_in(s_in),   .inv(inv), .s_out(sb_out));
  shift_rows u_shift (.s_in(sb_out), .inv(inv), .s_out(sr_out));

  // decryption: key addition ahead of the column mixing
  add_round_key u_ark_dec (.s_in(sr_out), .round_key(round_key), .s_out(dec_ark_out));

  assign mc_in = inv ? dec_ark_out : sr_out;
  mix_columns u_mix (.s_in(mc_in), .inv(inv), .s_out(mc_out));

  // encryption: key addition after the column mixing (skipped in the last round)
  assign enc_ark_in = last ? sr_out : mc_out;
  add_round_key u_ark_enc (.s_in(enc_ark_in), .round_key(round_key), .s_out(enc_ark_out));

  assign s_out = inv ? (last ? dec_ark_out : mc_out) : enc_ark_out;

endmodule
