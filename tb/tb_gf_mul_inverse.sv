// tb_gf_mul_inverse: exhaustive check of the composite-field inverse. For
// every nonzero x, x * inv(x) must be 1 in GF((2^4)^2) (multiplier written out
// here from the tower definition), and inv(0) must be 0.
module tb_gf_mul_inverse;
  int checks = 0, failures = 0;
  logic [7:0] q, y;

  function automatic logic [1:0] m2(input logic [1:0] a, input logic [1:0] b);
    logic [2:0] p = {a[1] & b[1], (a[1] & b[0]) ^ (a[0] & b[1]), a[0] & b[0]};
    return {p[1] ^ p[2], p[0] ^ p[2]};
  endfunction
  function automatic logic [3:0] m4(input logic [3:0] a, input logic [3:0] b);
    logic [1:0] hh = m2(a[3:2], b[3:2]);
    logic [1:0] hl = m2(a[3:2], b[1:0]) ^ m2(a[1:0], b[3:2]);
    logic [1:0] ll = m2(a[1:0], b[1:0]);
    return {hl ^ hh, ll ^ m2(hh, 2'b10)};
  endfunction
  function automatic logic [7:0] m8(input logic [7:0] a, input logic [7:0] b);
    logic [3:0] hh = m4(a[7:4], b[7:4]);
    logic [3:0] hl = m4(a[7:4], b[3:0]) ^ m4(a[3:0], b[7:4]);
    logic [3:0] ll = m4(a[3:0], b[3:0]);
    return {hl ^ hh, ll ^ m4(hh, 4'hc)};
  endfunction

  gf_mul_inverse dut (.q(q), .y(y));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int v = 0; v < 256; v++) begin
      q = 8'(v);
      #1;
      checks++;
      if (v == 0 ? (y !== 8'h00) : (m8(q, y) !== 8'h01)) begin
        failures++; $display("FAIL inv(%h)=%h", q, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
