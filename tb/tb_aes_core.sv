// tb_aes_core: runs the round controller with round keys supplied by the
// reference schedule (looked up from rk_idx). Encrypts and decrypts random
// blocks under random keys, checks results against the reference cipher, the
// 10-cycle latency, that in_ready is low while busy or while keys_ok is low,
// and that the output is held while out_ready is low.
module tb_aes_core;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic         clk = 0, rst_n = 0;
  logic         keys_ok = 0, in_valid = 0, in_decrypt = 0, out_ready = 0;
  logic         in_ready, out_valid, out_decrypt, busy;
  logic [127:0] in_data = '0, out_data, rk;
  logic [3:0]   rk_idx;
  sched_t       w;

  aes_core dut (.clk(clk), .rst_n(rst_n), .keys_ok(keys_ok), .in_valid(in_valid),
                .in_ready(in_ready), .in_decrypt(in_decrypt), .in_data(in_data),
                .out_valid(out_valid), .out_ready(out_ready), .out_decrypt(out_decrypt),
                .out_data(out_data), .busy(busy), .rk_idx(rk_idx), .rk(rk));

  assign rk = ref_rk(w, (rk_idx > 10) ? 10 : int'(rk_idx));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [127:0] k, input logic [127:0] d, input bit dec, input int stall);
    logic [127:0] e;
    int lat;
    w = ref_expand(k);
    e = dec ? ref_decrypt(k, d) : ref_encrypt(k, d);
    @(negedge clk);
    in_valid = 1; in_data = d; in_decrypt = dec;
    checks++;
    if (!in_ready) begin failures++; $display("FAIL not ready when idle"); end
    @(negedge clk);
    in_valid = 0;
    lat = 0;
    while (!out_valid) begin
      checks++;
      if (in_ready) begin failures++; $display("FAIL in_ready while busy"); end
      @(negedge clk);
      lat++;
    end
    checks++;
    if (lat != 10) begin failures++; $display("FAIL latency %0d", lat); end
    repeat (stall) begin
      @(negedge clk);
      checks++;
      if (!out_valid || out_data !== e) begin failures++; $display("FAIL output not held"); end
    end
    checks += 2;
    if (out_data !== e) begin failures++; $display("FAIL dec=%0d key %h in %h got %h exp %h", dec, k, d, out_data, e); end
    if (out_decrypt !== dec) begin failures++; $display("FAIL out_decrypt"); end
    out_ready = 1;
    @(negedge clk);
    out_ready = 0;
  endtask

  initial begin
    w = ref_expand('0);
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (in_ready) begin failures++; $display("FAIL in_ready without keys"); end
    keys_ok = 1;
    run(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff, 0, 0);
    checks++;
    if (out_data !== 128'h69c4e0d86a7b0430d8cdb78070b4c55a) begin failures++; $display("FAIL fips C.1"); end
    run(128'h000102030405060708090a0b0c0d0e0f, 128'h69c4e0d86a7b0430d8cdb78070b4c55a, 1, 2);
    for (int n = 0; n < 30; n++)
      run({$urandom, $urandom, $urandom, $urandom}, {$urandom, $urandom, $urandom, $urandom}, n[0], n % 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
