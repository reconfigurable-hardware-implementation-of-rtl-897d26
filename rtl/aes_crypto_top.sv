// aes_crypto_top: AES-128 crypto system with a combinational-logic S-box.
//
// A 128-bit secret key is loaded with key_valid/key_ready; key_expansion then
// builds the 44-word schedule in NR cycles (keys_valid rises when it is
// complete). Blocks enter with in_valid/in_ready together with in_decrypt
// (0 = encrypt plain text, 1 = decrypt cipher text) and leave with
// out_valid/out_ready after NR clock cycles in aes_core, which runs one round
// per clock through a datapath shared by both directions. The same key serves
// encryption and decryption. A new key is accepted only when no block is in
// flight and no expansion runs; blocks wait while the schedule is incomplete.
// All S-boxes (16 in the round, 4 in the key schedule) are composite-field
// logic without lookup tables. Reset is active low and asynchronous.
module aes_crypto_top
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   key_valid,
  output logic   key_ready,
  input  state_t key_in,
  output logic   keys_valid,
  input  logic   in_valid,
  output logic   in_ready,
  input  logic   in_decrypt,
  input  state_t in_data,
  output logic   out_valid,
  input  logic   out_ready,
  output logic   out_decrypt,
  output state_t out_data
);

  logic       kx_busy, kx_done, core_busy;
  logic [3:0] rk_idx;
  state_t     rk;

  assign key_ready  = !kx_busy && !core_busy;
  assign keys_valid = kx_done;

  key_expansion #(.NR_P(NR)) u_key_expansion (
    .clk   (clk),
    .rst_n (rst_n),
    .start (key_valid && key_ready),
    .key   (key_in),
    .busy  (kx_busy),
    .done  (kx_done),
    .rk_idx(rk_idx),
    .rk    (rk)
  );

  aes_core #(.NR_P(NR)) u_core (
    .clk        (clk),
    .rst_n      (rst_n),
    .keys_ok    (kx_done && !(key_valid && key_ready)),
    .in_valid   (in_valid),
    .in_ready   (in_ready),
    .in_decrypt (in_decrypt),
    .in_data    (in_data),
    .out_valid  (out_valid),
    .out_ready  (out_ready),
    .out_decrypt(out_decrypt),
    .out_data   (out_data),
    .busy       (core_busy),
    .rk_idx     (rk_idx),
    .rk         (rk)
  );

endmodule
