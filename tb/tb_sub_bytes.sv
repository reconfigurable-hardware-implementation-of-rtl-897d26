// tb_sub_bytes: drives random states in both directions and compares with the
// reference model (ref_sub in aes_ref_pkg). Also checks that the inverse
// direction undoes the forward one.
module tb_sub_bytes;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [127:0] s_in, s_out, s_back;
  logic         inv;

  sub_bytes dut  (.s_in(s_in),  .inv(inv),  .s_out(s_out));
  sub_bytes dut2 (.s_in(s_out), .inv(1'b1), .s_out(s_back));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic one(input logic [127:0] v, input bit m);
    s_in = v; inv = m;
    #1;
    checks++;
    if (s_out !== ref_sub(v, m)) begin failures++; $display("FAIL inv=%0d in %h got %h exp %h", m, v, s_out, ref_sub(v, m)); end
    if (!m) begin
      checks++;
      if (s_back !== v) begin failures++; $display("FAIL roundtrip %h", v); end
    end
  endtask
  initial begin
    for (int n = 0; n < 200; n++)
      one({$urandom, $urandom, $urandom, $urandom}, n[0]);
    // FIPS-197 B, round 1: SubBytes of 193de3be a0f4e22b 9ac68d2a e9f84808
    one(128'h193de3bea0f4e22b9ac68d2ae9f84808, 1'b0);
    checks++;
    if (s_out !== 128'hd42711aee0bf98f1b8b45de51e415230) begin failures++; $display("FAIL fips subbytes"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
