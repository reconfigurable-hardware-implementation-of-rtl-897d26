// shift_rows: ShiftRows / InvShiftRows on the 128-bit state.
//
// Row r (bytes r, r+4, r+8, r+12) is rotated left by r byte positions for
// encryption (inv = 0) and right by r positions for decryption (inv = 1); row 0
// stays. Pure wiring plus a 2:1 multiplexer per byte.
module shift_rows
  import aes_pkg::*;
(
  input  state_t s_in,
  input  logic   inv,
  output state_t s_out
);

  always_comb begin
    for (int r = 0; r < 4; r++) begin
      for (int c = 0; c < 4; c++) begin
        // output byte (r,c) takes input byte (r, c+r) or (r, c-r)
        if (inv) s_out[127-8*(r+4*c) -: 8] = s_in[127-8*(r+4*((c+4-r)%4)) -: 8];
        else     s_out[127-8*(r+4*c) -: 8] = s_in[127-8*(r+4*((c+r)%4)) -: 8];
      end
    end
  end

endmodule
