// tb_aes_key_setup: loads keys and checks that key_ready rises exactly 11
// clock edges after the edge that sampled key_load, that enc_key is the cipher
// key and dec_key round key 10 (FIPS-197 A.1 key and random keys), that
// key_ready stays low out of reset, and that a second load during expansion
// restarts it with the new key.
module tb_aes_key_setup;
  import aes_ref_pkg::*;
  logic clk = 0, rst_n = 0, key_load = 0, key_ready;
  logic [127:0] key_in = '0, enc_key, dec_key;
  int checks = 0, failures = 0;

  aes_key_setup dut (.*);

  always #5 clk = ~clk;

  task automatic check(logic [127:0] got, logic [127:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %032h expected %032h", what, got, exp);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Pulse key_load for one cycle and count edges until key_ready.
  task automatic load(logic [127:0] k, output int cycles);
    @(negedge clk); key_in = k; key_load = 1;
    @(posedge clk); #1 key_load = 0;
    cycles = 1;
    while (!key_ready) begin
      @(posedge clk); #1;
      cycles++;
    end
  endtask

  initial begin
    int cyc;
    logic [127:0] k;
    ref_init();
    repeat (3) @(posedge clk);
    check(128'(key_ready), 128'(0), "not ready after reset");
    rst_n = 1;
    repeat (3) @(posedge clk);
    check(128'(key_ready), 128'(0), "not ready before a key is loaded");
    load(128'h2b7e151628aed2a6abf7158809cf4f3c, cyc);
    check(128'(cyc), 128'(11), "setup latency");
    check(enc_key, 128'h2b7e151628aed2a6abf7158809cf4f3c, "enc_key A.1");
    check(dec_key, 128'hd014f9a8c9ee2589e13f0cc8b6630ca6, "dec_key A.1");
    for (int n = 0; n < 20; n++) begin
      k = rand128();
      load(k, cyc);
      check(128'(cyc), 128'(11), "setup latency");
      check(enc_key, k, "enc_key");
      check(dec_key, round_key(k, 10), "dec_key");
    end
    // Restart during expansion.
    @(negedge clk); key_in = rand128(); key_load = 1;
    @(negedge clk); key_load = 0;
    repeat (4) @(negedge clk);
    check(128'(key_ready), 128'(0), "busy during expansion");
    k = rand128();
    load(k, cyc);
    check(128'(cyc), 128'(11), "restart latency");
    check(dec_key, round_key(k, 10), "dec_key after restart");
    repeat (5) @(posedge clk);
    check(128'(key_ready), 128'(1), "stays ready");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
