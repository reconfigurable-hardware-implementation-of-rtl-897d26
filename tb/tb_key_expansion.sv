// tb_key_expansion: expands the FIPS-197 Appendix A.1 key and random keys and
// compares all 11 round keys with the reference schedule. Checks that done
// rises exactly NR = 10 cycles after start, that busy is high meanwhile, and
// that a start while busy is ignored.
module tb_key_expansion;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic         clk = 0, rst_n = 0, start = 0, busy, done;
  logic [127:0] key, rk;
  logic [3:0]   rk_idx = 0;

  key_expansion dut (.clk(clk), .rst_n(rst_n), .start(start), .key(key), .busy(busy),
                     .done(done), .rk_idx(rk_idx), .rk(rk));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expand_and_check(input logic [127:0] k, input bit poke_busy);
    sched_t w;
    int cyc;
    w = ref_expand(k);
    @(negedge clk);
    key = k; start = 1;
    @(negedge clk);
    start = 0;
    cyc = 0;
    if (poke_busy) begin
      // a second start while busy must be ignored
      key = ~k; start = 1;
      @(negedge clk);
      start = 0; cyc++;
    end
    while (!done) begin
      checks++;
      if (!busy) begin failures++; $display("FAIL busy low while expanding"); end
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (cyc != 10) begin failures++; $display("FAIL expansion took %0d cycles", cyc); end
    for (int r = 0; r <= 10; r++) begin
      rk_idx = 4'(r);
      #1;
      checks++;
      if (rk !== ref_rk(w, r)) begin failures++; $display("FAIL key %h rk%0d %h exp %h", k, r, rk, ref_rk(w, r)); end
    end
  endtask

  initial begin
    key = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    checks++;
    if (done || busy) begin failures++; $display("FAIL state after reset"); end
    expand_and_check(128'h2b7e151628aed2a6abf7158809cf4f3c, 0);
    rk_idx = 4'd10; #1;
    checks++;
    if (rk !== 128'hd014f9a8c9ee2589e13f0cc8b6630ca6) begin failures++; $display("FAIL fips w40..43"); end
    expand_and_check(128'h000102030405060708090a0b0c0d0e0f, 1);
    for (int n = 0; n < 20; n++) expand_and_check({$urandom, $urandom, $urandom, $urandom}, n[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
