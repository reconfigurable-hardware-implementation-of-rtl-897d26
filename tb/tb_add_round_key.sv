// tb_add_round_key: random states and keys against a bitwise XOR, plus the
// first AddRoundKey of the FIPS-197 Appendix B example.
module tb_add_round_key;
  int checks = 0, failures = 0;
  logic [127:0] s_in, rk, s_out;
  add_round_key dut (.s_in(s_in), .round_key(rk), .s_out(s_out));
  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    s_in = 128'h3243f6a8885a308d313198a2e0370734;
    rk   = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    #1;
    checks++;
    if (s_out !== 128'h193de3bea0f4e22b9ac68d2ae9f84808) begin failures++; $display("FAIL fips ark"); end
    for (int n = 0; n < 200; n++) begin
      logic [127:0] e;
      s_in = {$urandom, $urandom, $urandom, $urandom};
      rk   = {$urandom, $urandom, $urandom, $urandom};
      #1;
      for (int b = 0; b < 128; b++) e[b] = (s_in[b] != rk[b]);
      checks++;
      if (s_out !== e) begin failures++; $display("FAIL %h ^ %h = %h", s_in, rk, s_out); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
