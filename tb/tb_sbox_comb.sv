// tb_sbox_comb: exhaustive check of the combinational S-box against the
// published 16x16 S-box table (sbox_table.hex, row = high nibble) in the
// forward direction, and of the inverse direction against the inverted table.
module tb_sbox_comb;
  int checks = 0, failures = 0;
  logic [7:0] tbl [256];
  logic [7:0] itbl [256];
  logic [7:0] x, y;
  logic       inv;

  sbox_comb dut (.x(x), .inv(inv), .y(y));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    $readmemh("tb/sbox_table.hex", tbl);
    for (int v = 0; v < 256; v++) itbl[tbl[v]] = 8'(v);
    for (int m = 0; m < 2; m++) begin
      inv = m[0];
      for (int v = 0; v < 256; v++) begin
        x = 8'(v);
        #1;
        checks++;
        if (y !== (inv ? itbl[v] : tbl[v])) begin
          failures++; $display("FAIL inv=%0d S(%h)=%h", inv, x, y);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
