// tb_affine_transform: exhaustive check of AT and AT^-1 against the rotation
// form of the AES affine map (b = a ^ rotl1 ^ rotl2 ^ rotl3 ^ rotl4 ^ 63 and
// b = rotl1 ^ rotl3 ^ rotl6 ^ 05), plus the round trip AT^-1(AT(a)) = a.
module tb_affine_transform;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [7:0] a, bf, bi, rt;
  affine_transform #(.INVERSE(1'b0)) dut_f (.a(a), .b(bf));
  affine_transform #(.INVERSE(1'b1)) dut_i (.a(a), .b(bi));
  affine_transform #(.INVERSE(1'b1)) dut_r (.a(bf), .b(rt));
  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int v = 0; v < 256; v++) begin
      a = 8'(v);
      #1;
      checks += 3;
      if (bf !== (a ^ rotl8(a,1) ^ rotl8(a,2) ^ rotl8(a,3) ^ rotl8(a,4) ^ 8'h63)) begin failures++; $display("FAIL AT(%h)=%h", a, bf); end
      if (bi !== (rotl8(a,1) ^ rotl8(a,3) ^ rotl8(a,6) ^ 8'h05)) begin failures++; $display("FAIL ATi(%h)=%h", a, bi); end
      if (rt !== a) begin failures++; $display("FAIL roundtrip %h", a); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
