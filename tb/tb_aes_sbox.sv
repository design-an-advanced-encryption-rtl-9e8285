// tb_aes_sbox: checks the shared S-box against the reference table for all 256
// inputs in both directions, plus the FIPS-197 examples S(0x00)=0x63,
// S(0x53)=0xED and InvS(0xED)=0x53.
module tb_aes_sbox;
  import aes_ref_pkg::*;
  logic [7:0] din, dout;
  logic inv;
  int checks = 0, failures = 0;

  aes_sbox dut (.din(din), .inv(inv), .dout(dout));

  task automatic check(logic [7:0] got, logic [7:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %02h expected %02h", what, got, exp);
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
    for (int m = 0; m < 2; m++)
      for (int x = 0; x < 256; x++) begin
        din = 8'(x); inv = m[0]; #1;
        check(dout, m ? isbox_t[x] : sbox_t[x], $sformatf("inv=%0d x=%02h", m, x));
      end
    din = 8'h00; inv = 0; #1; check(dout, 8'h63, "S(00)");
    din = 8'h53; inv = 0; #1; check(dout, 8'hed, "S(53)");
    din = 8'hed; inv = 1; #1; check(dout, 8'h53, "InvS(ed)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
