// tb_aes_add_round_key: AddRoundKey on the FIPS-197 Appendix B first step
// (input ^ cipher key) and on random state/key pairs.
module tb_aes_add_round_key;
  import aes_ref_pkg::*;
  logic [127:0] din, key, dout;
  int checks = 0, failures = 0;

  aes_add_round_key dut (.din(din), .key(key), .dout(dout));

  task automatic check(logic [127:0] got, logic [127:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %032h expected %032h", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = 128'h3243f6a8885a308d313198a2e0370734;
    key = 128'h2b7e151628aed2a6abf7158809cf4f3c; #1;
    check(dout, 128'h193de3bea0f4e22b9ac68d2ae9f84808, "FIPS-197 B initial");
    for (int n = 0; n < 100; n++) begin
      logic [127:0] a, k, e;
      a = rand128(); k = rand128();
      for (int i = 0; i < 128; i++) e[i] = (a[i] != k[i]);
      din = a; key = k; #1;
      check(dout, e, "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
