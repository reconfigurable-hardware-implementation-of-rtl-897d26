// tb_shift_rows: drives random states in both directions and compares with the
// reference model (ref_shift in aes_ref_pkg). Also checks that the inverse
// direction undoes the forward one.
module tb_shift_rows;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [127:0] s_in, s_out, s_back;
  logic         inv;

  shift_rows dut  (.s_in(s_in),  .inv(inv),  .s_out(s_out));
  shift_rows dut2 (.s_in(s_out), .inv(1'b1), .s_out(s_back));

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
    if (s_out !== ref_shift(v, m)) begin failures++; $display("FAIL inv=%0d in %h got %h exp %h", m, v, s_out, ref_shift(v, m)); end
    if (!m) begin
      checks++;
      if (s_back !== v) begin failures++; $display("FAIL roundtrip %h", v); end
    end
  endtask
  initial begin
    for (int n = 0; n < 200; n++)
      one({$urandom, $urandom, $urandom, $urandom}, n[0]);
    one(128'hd42711aee0bf98f1b8b45de51e415230, 1'b0);
    checks++;
    if (s_out !== 128'hd4bf5d30e0b452aeb84111f11e2798e5) begin failures++; $display("FAIL fips shiftrows"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
