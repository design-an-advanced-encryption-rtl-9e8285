// tb_aes_last_round: the round-10 stage in both directions. Encryption of the
// FIPS-197 Appendix B round-10 input must give the ciphertext 3925841d...;
// random blocks are checked against SubBytes/ShiftRows/AddRoundKey(k[10]) and
// InvShiftRows/InvSubBytes/AddRoundKey(k[0]) with the reference model, one
// clock after they are applied.
module tb_aes_last_round;
  import aes_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_decrypt, out_valid, out_decrypt;
  logic [127:0] in_state, in_key, out_state, out_key;
  int checks = 0, failures = 0;

  aes_last_round dut (.*);

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
    logic [127:0] rk[11], key, s, es, ek;
    logic ev, ed;
    ref_init();
    in_valid = 1; in_decrypt = 0; in_state = '0; in_key = '0;
    @(posedge clk); #1;
    check(128'(out_valid), 0, "valid held in reset");
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      key = (n == 0) ? 128'h2b7e151628aed2a6abf7158809cf4f3c : rand128();
      s   = (n == 0) ? 128'heb40f21e592e38848ba113e71bc342d2 : rand128();
      ed  = (n == 0) ? 0 : $urandom_range(1);
      ev  = (n % 5 != 2);
      expand(key, rk);
      in_valid = ev; in_decrypt = ed; in_state = s;
      if (!ed) begin
        in_key = rk[9]; es = shift(sub(s, 0), 0) ^ rk[10]; ek = rk[10];
      end else begin
        in_key = rk[1]; es = sub(shift(s, 1), 1) ^ rk[0]; ek = rk[0];
      end
      @(posedge clk); #1;
      check(128'(out_valid), 128'(ev), "valid");
      check(128'(out_decrypt), 128'(ed), "mode");
      check(out_state, es, "state");
      check(out_key, ek, "key");
      if (n == 0) check(out_state, 128'h3925841d02dc09fbdc118597196a0b32, "FIPS-197 B ciphertext");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
