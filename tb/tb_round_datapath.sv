// tb_round_datapath: one round in each direction and both last-round forms,
// with random states and keys, against the reference model; plus round 1 of
// the FIPS-197 Appendix B example.
module tb_round_datapath;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [127:0] s_in, rk, s_out, e;
  logic         inv, last;

  round_datapath dut (.s_in(s_in), .round_key(rk), .inv(inv), .last(last), .s_out(s_out));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    s_in = 128'h193de3bea0f4e22b9ac68d2ae9f84808;
    rk   = 128'ha0fafe1788542cb123a339392a6c7605;
    inv = 0; last = 0;
    #1;
    checks++;
    if (s_out !== 128'ha49c7ff2689f352b6b5bea43026a5049) begin failures++; $display("FAIL fips round1 %h", s_out); end
    for (int n = 0; n < 400; n++) begin
      s_in = {$urandom, $urandom, $urandom, $urandom};
      rk   = {$urandom, $urandom, $urandom, $urandom};
      inv  = n[0];
      last = n[1];
      #1;
      if (!inv) begin
        e = ref_shift(ref_sub(s_in, 0), 0);
        if (!last) e = ref_mix(e, 0);
        e ^= rk;
      end else begin
        e = ref_sub(ref_shift(s_in, 1), 1) ^ rk;
        if (!last) e = ref_mix(e, 1);
      end
      checks++;
      if (s_out !== e) begin failures++; $display("FAIL inv=%0d last=%0d got %h exp %h", inv, last, s_out, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
