// tb_isomap: checks the isomorphic mapping delta and its inverse. delta must
// be a field isomorphism: it maps 0 and 1 to themselves, is undone by
// delta^-1 for all 256 bytes, and turns AES multiplication into
// composite-field multiplication. The composite product (tower x^2+x+lambda
// over GF(2^4), GF(2^4) over GF(2^2)) is written out here bit by bit.
module tb_isomap;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [7:0] q, y, back, pa, pb, ya, yb, yp;

  function automatic logic [1:0] m2(input logic [1:0] a, input logic [1:0] b);
    // GF(4) with x^2 = x + 1
    logic [2:0] p = {a[1] & b[1], (a[1] & b[0]) ^ (a[0] & b[1]), a[0] & b[0]};
    return {p[1] ^ p[2], p[0] ^ p[2]};
  endfunction
  function automatic logic [3:0] m4(input logic [3:0] a, input logic [3:0] b);
    // GF(16) = GF(4)[y]/(y^2 + y + phi), phi = 2
    logic [1:0] hh = m2(a[3:2], b[3:2]);
    logic [1:0] hl = m2(a[3:2], b[1:0]) ^ m2(a[1:0], b[3:2]);
    logic [1:0] ll = m2(a[1:0], b[1:0]);
    return {hl ^ hh, ll ^ m2(hh, 2'b10)};
  endfunction
  function automatic logic [7:0] m8(input logic [7:0] a, input logic [7:0] b);
    // GF(256) = GF(16)[z]/(z^2 + z + lambda), lambda = 0xC
    logic [3:0] hh = m4(a[7:4], b[7:4]);
    logic [3:0] hl = m4(a[7:4], b[3:0]) ^ m4(a[3:0], b[7:4]);
    logic [3:0] ll = m4(a[3:0], b[3:0]);
    return {hl ^ hh, ll ^ m4(hh, 4'hc)};
  endfunction

  isomap #(.INVERSE(1'b0)) dut   (.q(q), .y(y));
  isomap #(.INVERSE(1'b1)) dut_i (.q(y), .y(back));
  isomap #(.INVERSE(1'b0)) dut_a (.q(pa), .y(ya));
  isomap #(.INVERSE(1'b0)) dut_b (.q(pb), .y(yb));
  isomap #(.INVERSE(1'b0)) dut_p (.q(ref_gmul(pa, pb)), .y(yp));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int v = 0; v < 256; v++) begin
      q = 8'(v);
      #1;
      checks++;
      if (back !== q) begin failures++; $display("FAIL roundtrip %h -> %h -> %h", q, y, back); end
    end
    q = 8'h01; #1; checks++; if (y !== 8'h01) begin failures++; $display("FAIL delta(1)=%h", y); end
    q = 8'h00; #1; checks++; if (y !== 8'h00) begin failures++; $display("FAIL delta(0)=%h", y); end
    for (int n = 0; n < 2000; n++) begin
      pa = 8'($urandom); pb = 8'($urandom);
      #1;
      checks++;
      if (yp !== m8(ya, yb)) begin failures++; $display("FAIL product %h*%h", pa, pb); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
