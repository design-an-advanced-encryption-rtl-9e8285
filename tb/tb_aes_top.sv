// tb_aes_top: end-to-end test of the pipelined AES-128 core at its default
// (and only) size.
//
// A driver presents blocks on the falling edge; a scoreboard records every
// block the core accepts (in_valid && in_ready) with its expected result from
// the reference model and the cycle it entered, and checks each out_valid
// result, its direction bit and a latency of exactly 11 cycles, in order.
// Traffic: the FIPS-197 Appendix B and C.1 vectors in both directions, then
// random blocks with random direction and random idle cycles, with new keys
// loaded now and then while earlier blocks are still in the pipeline.
// Each mechanism of the design is counted and must occur: key load and
// expansion wait, encryption, decryption, a direction change between
// back-to-back blocks, a full pipeline (11 blocks in flight), a key change
// with blocks in flight, and idle bubbles.
module tb_aes_top;
  import aes_ref_pkg::*;

  localparam int LATENCY = 11;

  logic clk = 0, rst_n = 0;
  logic key_load = 0, in_ready, in_valid = 0, in_decrypt = 0;
  logic out_valid, out_decrypt;
  logic [127:0] key_in = '0, in_block = '0, out_block;

  aes_top dut (.*);

  always #5 clk = ~clk;

  typedef struct {
    logic [127:0] expect_block;
    logic         decrypt;
    int           cycle;
  } pending_t;

  pending_t     q[$];
  logic [127:0] cur_key;
  int cycle = 0, checks = 0, failures = 0;
  int n_key_load = 0, n_key_wait = 0, n_enc = 0, n_dec = 0, n_switch = 0;
  int n_full = 0, n_key_inflight = 0, n_bubble = 0, n_out = 0;
  int run_len = 0;
  logic last_acc = 0, last_dec = 0;

  task automatic check(logic [127:0] got, logic [127:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %032h expected %032h", what, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Scoreboard and mechanism counters, sampled at each rising edge.
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) begin
      if (in_valid && in_ready) begin
        q.push_back('{in_decrypt ? decrypt(in_block, cur_key) : encrypt(in_block, cur_key),
                      in_decrypt, cycle});
        if (in_decrypt) n_dec++; else n_enc++;
        if (last_acc && last_dec != in_decrypt) n_switch++;
        run_len++;
        if (run_len >= LATENCY) n_full++;
        last_dec = in_decrypt;
      end else begin
        run_len = 0;
      end
      last_acc = in_valid && in_ready;
      if (in_ready && !in_valid && !key_load) n_bubble++;
      if (!in_ready) n_key_wait++;
      if (key_load) begin
        n_key_load++;
        if (q.size() > 0) n_key_inflight++;
      end
      if (out_valid) begin
        n_out++;
        if (q.size() == 0) begin
          failures++;
          $display("FAIL unexpected output %032h", out_block);
        end else begin
          pending_t p;
          p = q.pop_front();
          check(out_block, p.expect_block, $sformatf("block entered at cycle %0d", p.cycle));
          check(128'(out_decrypt), 128'(p.decrypt), "direction");
          check(128'(cycle - p.cycle), 128'(LATENCY), "latency");
        end
      end
    end
  end

  task automatic load_key(logic [127:0] k);
    @(negedge clk);
    in_valid = 0; key_load = 1; key_in = k;
    @(negedge clk);
    key_load = 0;
    cur_key = k;
    while (!in_ready) @(negedge clk);
  endtask

  // Present one block; waits while the core is not ready.
  task automatic send(logic [127:0] b, logic dec);
    while (!in_ready) @(negedge clk);
    in_valid = 1; in_block = b; in_decrypt = dec;
    @(negedge clk);
    in_valid = 0;
  endtask

  task automatic drain();
    while (q.size() > 0) @(negedge clk);
  endtask

  // Direct known-answer checks, independent of the reference model.
  logic [127:0] seen[$];
  always @(posedge clk) if (out_valid) seen.push_back(out_block);

  initial begin
    ref_init();
    repeat (3) @(negedge clk);
    rst_n = 1;
    check(128'(in_ready), 128'(0), "no key after reset");

    // FIPS-197 Appendix B.
    load_key(128'h2b7e151628aed2a6abf7158809cf4f3c);
    send(128'h3243f6a8885a308d313198a2e0370734, 0);
    send(128'h3925841d02dc09fbdc118597196a0b32, 1);
    drain();
    // FIPS-197 Appendix C.1.
    load_key(128'h000102030405060708090a0b0c0d0e0f);
    send(128'h00112233445566778899aabbccddeeff, 0);
    send(128'h69c4e0d86a7b0430d8cdb78070b4c55a, 1);
    drain();
    @(negedge clk);
    check(seen[0], 128'h3925841d02dc09fbdc118597196a0b32, "FIPS-197 B encrypt");
    check(seen[1], 128'h3243f6a8885a308d313198a2e0370734, "FIPS-197 B decrypt");
    check(seen[2], 128'h69c4e0d86a7b0430d8cdb78070b4c55a, "FIPS-197 C.1 encrypt");
    check(seen[3], 128'h00112233445566778899aabbccddeeff, "FIPS-197 C.1 decrypt");

    // Random traffic with key changes in flight.
    for (int n = 0; n < 3000; n++) begin
      if (n % 600 == 599) begin
        // New key while the pipeline still holds blocks of the old one.
        in_valid = 0; key_load = 1; key_in = rand128();
        @(negedge clk);
        key_load = 0; cur_key = key_in;
      end else if (!in_ready) begin
        in_valid = 0;
        @(negedge clk);
      end else begin
        in_valid   = (n % 100 < 50) || ($urandom_range(99) < 80);
        in_block   = rand128();
        in_decrypt = (n % 100 < 30) ? 1'b0 : 1'($urandom_range(1));
        @(negedge clk);
      end
    end
    in_valid = 0;
    drain();
    repeat (15) @(negedge clk);
    check(128'(q.size()), 0, "all blocks returned");

    $display("mechanisms: key_load=%0d key_wait_cycles=%0d encrypt=%0d decrypt=%0d switch=%0d full_pipeline=%0d key_change_in_flight=%0d bubbles=%0d outputs=%0d",
             n_key_load, n_key_wait, n_enc, n_dec, n_switch, n_full, n_key_inflight, n_bubble, n_out);
    checks++; if (n_key_load == 0)     begin failures++; $display("FAIL no key load"); end
    checks++; if (n_key_wait == 0)     begin failures++; $display("FAIL never waited for key"); end
    checks++; if (n_enc == 0)          begin failures++; $display("FAIL no encryption"); end
    checks++; if (n_dec == 0)          begin failures++; $display("FAIL no decryption"); end
    checks++; if (n_switch == 0)       begin failures++; $display("FAIL no direction switch"); end
    checks++; if (n_full == 0)         begin failures++; $display("FAIL pipeline never full"); end
    checks++; if (n_key_inflight == 0) begin failures++; $display("FAIL no key change in flight"); end
    checks++; if (n_bubble == 0)       begin failures++; $display("FAIL no bubble"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
