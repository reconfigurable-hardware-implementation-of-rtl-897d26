// mix_columns: MixColumns / InvMixColumns on the 128-bit state.
//
// Each column (a0..a3) is multiplied over GF(2^8) by the circulant matrix with
// first row {02 03 01 01} (inv = 0) or {0e 0b 0d 09} (inv = 1). The products
// are formed with xtime (multiply by x modulo x^8+x^4+x^3+x+1): with
// a2x = 2a, a4x = 4a, a8x = 8a, 3a = 2a^a, 9a = 8a^a, 0b = 8a^2a^a,
// 0d = 8a^4a^a and 0e = 8a^4a^2a. Combinational.
module mix_columns
  import aes_pkg::*;
(
  input  state_t s_in,
  input  logic   inv,
  output state_t s_out
);

  // coefficient multiply, k in {1,2,3,9,b,d,e}
  function automatic byte_t gmul(input byte_t a, input logic [3:0] k);
    byte_t a2, a4, a8, p;
    a2 = xtime(a);
    a4 = xtime(a2);
    a8 = xtime(a4);
    p  = 8'h00;
    if (k[0]) p = p ^ a;
    if (k[1]) p = p ^ a2;
    if (k[2]) p = p ^ a4;
    if (k[3]) p = p ^ a8;
    return p;
  endfunction

  always_comb begin
    logic [3:0] row0 [4];
    byte_t      a [4];
    byte_t      m;
    if (inv) row0 = '{4'he, 4'hb, 4'hd, 4'h9};
    else     row0 = '{4'h2, 4'h3, 4'h1, 4'h1};
    for (int c = 0; c < 4; c++) begin
      for (int r = 0; r < 4; r++) a[r] = s_in[127-8*(r+4*c) -: 8];
      for (int r = 0; r < 4; r++) begin
        m = 8'h00;
        // row r of a circulant matrix: coefficient for a[j] is row0[(j-r) mod 4]
        for (int j = 0; j < 4; j++) m = m ^ gmul(a[j], row0[(j+4-r)%4]);
        s_out[127-8*(r+4*c) -: 8] = m;
      end
    end
  end

endmodule
