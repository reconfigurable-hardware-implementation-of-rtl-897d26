// isomap: isomorphic mapping between GF(2^8) (AES polynomial basis) and the
// composite field GF((2^4)^2) used by the combinational S-box.
//
// INVERSE = 0 applies delta (GF(2^8) -> composite), INVERSE = 1 applies
// delta^-1 (composite -> GF(2^8)). Each is an 8x8 GF(2) matrix times the byte,
// top row giving output bit 7. delta^-1 is the published matrix; delta is its
// matrix inverse (its first two rows are 10100000 and 11011110). Purely
// combinational: a few XOR gates per output bit.
module isomap
  import aes_pkg::*;
#(
  parameter bit INVERSE = 1'b0
) (
  input  byte_t q,
  output byte_t y
);

  localparam logic [7:0] DELTA_ROWS [8] = '{
    8'b10100000, 8'b11011110, 8'b10101100, 8'b10101110,
    8'b11000110, 8'b10011110, 8'b01010010, 8'b01000011
  };
  localparam logic [7:0] DELTA_INV_ROWS [8] = '{
    8'b11100010, 8'b01000100, 8'b01100010, 8'b01110110,
    8'b00111110, 8'b10011110, 8'b00110000, 8'b01110101
  };

  always_comb begin
    if (INVERSE) y = gf2_matvec(DELTA_INV_ROWS, q);
    else         y = gf2_matvec(DELTA_ROWS, q);
  end

endmodule
