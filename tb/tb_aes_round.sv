// tb_aes_round: one pipeline stage per round position 1..9 (nine instances
// with ROUND overridden), fed back-to-back with random blocks of both
// directions. Each output is checked one clock later against the reference:
// encryption stage r takes (s, k[r-1]) to (MixColumns(ShiftRows(SubBytes(s)))
// ^ k[r], k[r]); decryption stage r takes (s, k[11-r]) to
// (InvMixColumns(InvSubBytes(InvShiftRows(s)) ^ k[10-r]), k[10-r]).
// Also checks the FIPS-197 Appendix B round-1 output and that valid is cleared
// by reset and follows in_valid with one cycle of latency.
module tb_aes_round;
  import aes_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid[1:9], in_decrypt[1:9], out_valid[1:9], out_decrypt[1:9];
  logic [127:0] in_state[1:9], in_key[1:9], out_state[1:9], out_key[1:9];
  logic [127:0] exp_state[1:9], exp_key[1:9];
  logic exp_valid[1:9], exp_dec[1:9];
  int checks = 0, failures = 0;

  for (genvar r = 1; r <= 9; r++) begin : g_dut
    aes_round #(.ROUND(r)) dut (
      .clk(clk), .rst_n(rst_n),
      .in_valid(in_valid[r]), .in_decrypt(in_decrypt[r]),
      .in_state(in_state[r]), .in_key(in_key[r]),
      .out_valid(out_valid[r]), .out_decrypt(out_decrypt[r]),
      .out_state(out_state[r]), .out_key(out_key[r])
    );
  end

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

  initial begin
    logic [127:0] rk[11], key, s;
    ref_init();
    for (int r = 1; r <= 9; r++) begin
      in_valid[r] = 1; in_decrypt[r] = 0; in_state[r] = '0; in_key[r] = '0;
    end
    @(posedge clk); #1;
    for (int r = 1; r <= 9; r++) check(128'(out_valid[r]), 0, "valid held in reset");
    rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      for (int r = 1; r <= 9; r++) begin
        bit dec;
        key = (n == 0) ? 128'h2b7e151628aed2a6abf7158809cf4f3c : rand128();
        s   = (n == 0) ? 128'h193de3bea0f4e22b9ac68d2ae9f84808 : rand128();
        dec = (n == 0) ? 0 : $urandom_range(1);
        expand(key, rk);
        in_valid[r] = (n % 7 != 3); in_decrypt[r] = dec; in_state[r] = s;
        exp_valid[r] = in_valid[r]; exp_dec[r] = dec;
        if (!dec) begin
          in_key[r] = rk[r-1];
          exp_state[r] = mix(shift(sub(s, 0), 0), 0) ^ rk[r];
          exp_key[r] = rk[r];
        end else begin
          in_key[r] = rk[11-r];
          exp_state[r] = mix(sub(shift(s, 1), 1) ^ rk[10-r], 1);
          exp_key[r] = rk[10-r];
        end
      end
      @(posedge clk); #1;
      for (int r = 1; r <= 9; r++) begin
        check(128'(out_valid[r]), 128'(exp_valid[r]), "valid");
        check(128'(out_decrypt[r]), 128'(exp_dec[r]), "mode");
        check(out_state[r], exp_state[r], $sformatf("state round %0d", r));
        check(out_key[r], exp_key[r], $sformatf("key round %0d", r));
      end
      if (n == 0) check(out_state[1], 128'ha49c7ff2689f352b6b5bea43026a5049, "FIPS-197 B round 1");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
