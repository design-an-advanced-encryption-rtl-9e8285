// tb_aes_sub_bytes: SubBytes/InvSubBytes on random states against the
// reference model, a round trip, and the FIPS-197 Appendix B round-1 example
// (19 3d e3 be ... -> d4 27 11 ae ...).
module tb_aes_sub_bytes;
  import aes_ref_pkg::*;
  logic [127:0] din, dout, a;
  logic inv;
  int checks = 0, failures = 0;

  aes_sub_bytes dut (.din(din), .inv(inv), .dout(dout));

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
    ref_init();
    din = 128'h193de3bea0f4e22b9ac68d2ae9f84808; inv = 0; #1;
    check(dout, 128'hd42711aee0bf98f1b8b45de51e415230, "FIPS-197 B round 1");
    for (int n = 0; n < 200; n++) begin
      a = rand128();
      din = a; inv = n[0]; #1;
      check(dout, sub(a, n[0]), "random");
      din = dout; inv = !n[0]; #1;
      check(dout, a, "round trip");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
