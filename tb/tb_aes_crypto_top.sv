// tb_aes_crypto_top: end-to-end test of the AES-128 crypto system at its
// default configuration (no parameter overrides).
//
// A stimulus process loads keys and offers blocks with random modes, gaps and
// rekeys; a sink takes results with random back-pressure. A scoreboard
// computes each expected result with the reference cipher under the key in
// force when the block was accepted. It first runs the FIPS-197 C.1 and B
// examples. Each mechanism is counted and must occur at least once: key load
// and expansion, rekey, encryption, decryption, a switch between modes, a
// block held off while the schedule is incomplete, a block held off while the
// core is busy, a key held off while the core is busy, and an output held by
// out_ready low. The latency of every block (accept to out_valid) is checked
// to be 10 cycles.
module tb_aes_crypto_top;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;

  logic         clk = 0, rst_n = 0;
  logic         key_valid = 0, in_valid = 0, in_decrypt = 0, out_ready = 0;
  logic         key_ready, keys_valid, in_ready, out_valid, out_decrypt;
  logic [127:0] key_in = '0, in_data = '0, out_data;

  aes_crypto_top dut (
    .clk(clk), .rst_n(rst_n), .key_valid(key_valid), .key_ready(key_ready), .key_in(key_in),
    .keys_valid(keys_valid), .in_valid(in_valid), .in_ready(in_ready), .in_decrypt(in_decrypt),
    .in_data(in_data), .out_valid(out_valid), .out_ready(out_ready), .out_decrypt(out_decrypt),
    .out_data(out_data)
  );

  always #5 clk = ~clk;

  localparam int NBLOCKS = 200;

  // mechanism counters
  int n_keyload = 0, n_rekey = 0, n_enc = 0, n_dec = 0, n_switch = 0;
  int n_wait_keys = 0, n_wait_busy = 0, n_key_held = 0, n_out_stall = 0;
  int n_done = 0;

  logic [127:0] cur_key;
  logic [127:0] exp_q [$];
  bit           mode_q [$];
  int           acc_cycle_q [$];
  bit           last_mode = 0, have_last = 0;
  int           cycle = 0;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // scoreboard and mechanism monitor, sampled at the clock edge
  always @(posedge clk) if (rst_n) begin
    cycle++;
    if (key_valid && key_ready) begin
      if (n_keyload > 0) n_rekey++;
      n_keyload++;
      cur_key = key_in;
    end
    if (key_valid && !key_ready && (out_valid || !in_ready && keys_valid)) n_key_held++;
    if (in_valid && !in_ready && !keys_valid) n_wait_keys++;
    if (in_valid && !in_ready && keys_valid) n_wait_busy++;
    if (in_valid && in_ready) begin
      exp_q.push_back(in_decrypt ? ref_decrypt(cur_key, in_data) : ref_encrypt(cur_key, in_data));
      mode_q.push_back(in_decrypt);
      acc_cycle_q.push_back(cycle);
      if (in_decrypt) n_dec++; else n_enc++;
      if (have_last && last_mode != in_decrypt) n_switch++;
      last_mode = in_decrypt; have_last = 1;
    end
    if (out_valid && !out_ready) n_out_stall++;
    if (out_valid && out_ready) begin
      logic [127:0] e;
      checks += 2;
      if (exp_q.size() == 0) begin
        failures++; $display("FAIL unexpected output");
      end else begin
        e = exp_q.pop_front();
        if (out_data !== e || out_decrypt !== mode_q.pop_front()) begin
          failures++; $display("FAIL result %h exp %h", out_data, e);
        end
        void'(acc_cycle_q.pop_front());
      end
      n_done++;
    end
  end

  // latency: out_valid rises 10 cycles after the accepting edge
  logic out_valid_d = 0;
  always @(posedge clk) begin
    out_valid_d <= out_valid;
    if (rst_n && out_valid && !out_valid_d && acc_cycle_q.size() > 0) begin
      checks++;
      if (cycle - acc_cycle_q[0] != 10) begin
        failures++; $display("FAIL latency %0d", cycle - acc_cycle_q[0]);
      end
    end
  end

  // random sink
  always @(negedge clk) out_ready <= ($urandom % 4) != 0;

  task automatic load_key(input logic [127:0] k);
    key_in = k; key_valid = 1;
    do @(posedge clk); while (!(key_valid && key_ready));
    @(negedge clk);
    key_valid = 0;
  endtask

  task automatic send(input logic [127:0] d, input bit dec);
    in_data = d; in_decrypt = dec; in_valid = 1;
    do @(posedge clk); while (!(in_valid && in_ready));
    @(negedge clk);
    in_valid = 0;
  endtask

  task automatic drain();
    while (exp_q.size() != 0 || out_valid) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // FIPS-197 C.1: the block is offered together with the key, so it waits
    // for the schedule
    fork
      load_key(128'h000102030405060708090a0b0c0d0e0f);
      begin @(negedge clk); send(128'h00112233445566778899aabbccddeeff, 0); end
    join
    send(128'h69c4e0d86a7b0430d8cdb78070b4c55a, 1);
    drain();
    // FIPS-197 B; the key is offered while a block is in flight
    load_key(128'h2b7e151628aed2a6abf7158809cf4f3c);
    send(128'h3243f6a8885a308d313198a2e0370734, 0);
    @(negedge clk);
    load_key({$urandom, $urandom, $urandom, $urandom});
    // random traffic with occasional rekeys
    for (int n = 0; n < NBLOCKS; n++) begin
      if ($urandom % 25 == 0) load_key({$urandom, $urandom, $urandom, $urandom});
      repeat ($urandom % 3) @(negedge clk);
      send({$urandom, $urandom, $urandom, $urandom}, ($urandom % 3) == 0);
    end
    drain();
    // known answers once more, explicitly
    checks++;
    if (ref_encrypt(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3243f6a8885a308d313198a2e0370734)
        !== 128'h3925841d02dc09fbdc118597196a0b32) begin failures++; $display("FAIL reference"); end
    $display("blocks=%0d keyloads=%0d rekeys=%0d enc=%0d dec=%0d switches=%0d wait_keys=%0d wait_busy=%0d key_held=%0d out_stall=%0d",
             n_done, n_keyload, n_rekey, n_enc, n_dec, n_switch, n_wait_keys, n_wait_busy, n_key_held, n_out_stall);
    checks += 10;
    if (n_done != NBLOCKS + 3) begin failures++; $display("FAIL block count"); end
    if (n_keyload == 0)   begin failures++; $display("FAIL no key load"); end
    if (n_rekey == 0)     begin failures++; $display("FAIL no rekey"); end
    if (n_enc == 0)       begin failures++; $display("FAIL no encryption"); end
    if (n_dec == 0)       begin failures++; $display("FAIL no decryption"); end
    if (n_switch == 0)    begin failures++; $display("FAIL no mode switch"); end
    if (n_wait_keys == 0) begin failures++; $display("FAIL no wait for key schedule"); end
    if (n_wait_busy == 0) begin failures++; $display("FAIL no wait for busy core"); end
    if (n_key_held == 0)  begin failures++; $display("FAIL no key held off"); end
    if (n_out_stall == 0) begin failures++; $display("FAIL no output stall"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
