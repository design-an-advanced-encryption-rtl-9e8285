// tb_aes_key_step: walks the forward schedule k[0] -> k[10] and the reverse
// schedule k[10] -> k[0] one step at a time against the reference expansion,
// for the FIPS-197 Appendix A.1 key (k[10] = d014f9a8...) and random keys.
module tb_aes_key_step;
  import aes_ref_pkg::*;
  logic [127:0] key_in, key_out;
  logic [7:0] rcon;
  logic reverse;
  int checks = 0, failures = 0;
  // FIPS-197 round constants of steps 1..10.
  logic [7:0] rc_tab[10] = '{8'h01, 8'h02, 8'h04, 8'h08, 8'h10, 8'h20, 8'h40, 8'h80, 8'h1b, 8'h36};

  aes_key_step dut (.key_in(key_in), .rcon(rcon), .reverse(reverse), .key_out(key_out));

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
    logic [127:0] rk[11];
    logic [127:0] key;
    ref_init();
    for (int n = 0; n < 30; n++) begin
      key = (n == 0) ? 128'h2b7e151628aed2a6abf7158809cf4f3c : rand128();
      expand(key, rk);
      if (n == 0) begin
        checks++;
        if (rk[10] !== 128'hd014f9a8c9ee2589e13f0cc8b6630ca6) begin
          failures++; $display("FAIL reference model k10");
        end
      end
      for (int i = 1; i <= 10; i++) begin
        key_in = rk[i-1]; rcon = rc_tab[i-1]; reverse = 0; #1;
        check(key_out, rk[i], $sformatf("forward step %0d", i));
        key_in = rk[i]; reverse = 1; #1;
        check(key_out, rk[i-1], $sformatf("reverse step %0d", i));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
