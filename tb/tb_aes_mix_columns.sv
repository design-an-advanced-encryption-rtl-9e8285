// tb_aes_mix_columns: MixColumns/InvMixColumns on random states against the
// reference matrix multiply, a round trip, the FIPS-197 Appendix B round-1
// example and the classic column db 13 53 45 -> 8e 4d a1 bc.
module tb_aes_mix_columns;
  import aes_ref_pkg::*;
  logic [127:0] din, dout, a;
  logic inv;
  int checks = 0, failures = 0;

  aes_mix_columns dut (.din(din), .inv(inv), .dout(dout));

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
    din = 128'hd4bf5d30e0b452aeb84111f11e2798e5; inv = 0; #1;
    check(dout, 128'h046681e5e0cb199a48f8d37a2806264c, "FIPS-197 B round 1");
    din = {32'hdb135345, 32'hf20a225c, 32'h01010101, 32'hc6c6c6c6}; inv = 0; #1;
    check(dout, {32'h8e4da1bc, 32'h9fdc589d, 32'h01010101, 32'hc6c6c6c6}, "test columns");
    din = {32'h8e4da1bc, 32'h9fdc589d, 32'h01010101, 32'hc6c6c6c6}; inv = 1; #1;
    check(dout, {32'hdb135345, 32'hf20a225c, 32'h01010101, 32'hc6c6c6c6}, "inverse test columns");
    for (int n = 0; n < 200; n++) begin
      a = rand128();
      din = a; inv = n[0]; #1;
      check(dout, mix(a, n[0]), "random");
      din = dout; inv = !n[0]; #1;
      check(dout, a, "round trip");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
