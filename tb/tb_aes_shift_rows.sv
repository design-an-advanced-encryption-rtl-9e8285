// tb_aes_shift_rows: ShiftRows/InvShiftRows on random states against the
// reference model, a round trip, and the FIPS-197 Appendix B round-1 example.
module tb_aes_shift_rows;
  import aes_ref_pkg::*;
  logic [127:0] din, dout, a;
  logic inv;
  int checks = 0, failures = 0;

  aes_shift_rows dut (.din(din), .inv(inv), .dout(dout));

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
    din = 128'hd42711aee0bf98f1b8b45de51e415230; inv = 0; #1;
    check(dout, 128'hd4bf5d30e0b452aeb84111f11e2798e5, "FIPS-197 B round 1");
    din = 128'h000102030405060708090a0b0c0d0e0f; inv = 1; #1;
    check(dout, 128'h000d0a0704010e0b0805020f0c090603, "inverse on 00..0f");
    for (int n = 0; n < 200; n++) begin
      a = rand128();
      din = a; inv = n[0]; #1;
      check(dout, shift(a, n[0]), "random");
      din = dout; inv = !n[0]; #1;
      check(dout, a, "round trip");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
