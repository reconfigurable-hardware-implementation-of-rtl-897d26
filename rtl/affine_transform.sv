// affine_transform: the AES affine transform AT and its inverse AT^-1.
//
// INVERSE = 0: b = M * a xor 0x63 with M the circulant matrix whose first row
// (output bit 7) is 11111000. INVERSE = 1: b = Mi * a xor 0x05 with Mi the
// matrix whose first row is 01010010. Both matrices and constants are the ones
// of the S-box description this design follows; the row order (top row gives
// the most significant output bit) is as printed there. Purely combinational.
module affine_transform
  import aes_pkg::*;
#(
  parameter bit INVERSE = 1'b0
) (
  input  byte_t a,
  output byte_t b
);

  localparam logic [7:0] FWD_ROWS [8] = '{
    8'b11111000, 8'b01111100, 8'b00111110, 8'b00011111,
    8'b10001111, 8'b11000111, 8'b11100011, 8'b11110001
  };
  localparam logic [7:0] INV_ROWS [8] = '{
    8'b01010010, 8'b00101001, 8'b10010100, 8'b01001010,
    8'b00100101, 8'b10010010, 8'b01001001, 8'b10100100
  };

  always_comb begin
    if (INVERSE) b = gf2_matvec(INV_ROWS, a) ^ 8'h05;
    else         b = gf2_matvec(FWD_ROWS, a) ^ 8'h63;
  end

endmodule
