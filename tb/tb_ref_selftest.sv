// tb_ref_selftest: checks the testbench reference model (aes_ref_pkg) against
// the FIPS-197 known-answer vectors and the printed S-box table before it is
// trusted by the block testbenches.
module tb_ref_selftest;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [7:0] tbl [256];
  task automatic chk(input logic [127:0] got, input logic [127:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask
  initial begin
    sched_t w;
    $readmemh("tb/sbox_table.hex", tbl);
    for (int i = 0; i < 256; i++) chk(128'(ref_sbox(8'(i))), 128'(tbl[i]), "sbox");
    chk(ref_encrypt(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff),
        128'h69c4e0d86a7b0430d8cdb78070b4c55a, "fips C.1 enc");
    chk(ref_decrypt(128'h000102030405060708090a0b0c0d0e0f, 128'h69c4e0d86a7b0430d8cdb78070b4c55a),
        128'h00112233445566778899aabbccddeeff, "fips C.1 dec");
    chk(ref_encrypt(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3243f6a8885a308d313198a2e0370734),
        128'h3925841d02dc09fbdc118597196a0b32, "fips B enc");
    w = ref_expand(128'h2b7e151628aed2a6abf7158809cf4f3c);
    chk(ref_rk(w, 10), 128'hd014f9a8c9ee2589e13f0cc8b6630ca6, "fips A.1 w40..43");
    chk(ref_rk(w, 1), 128'ha0fafe1788542cb123a339392a6c7605, "fips A.1 w4..7");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
