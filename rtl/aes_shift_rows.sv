// aes_shift_rows: ShiftRows / InvShiftRows.
//
// Row r of the 4x4 state is rotated by r byte positions: to the left for
// encryption, to the right for decryption. Out[r][c] = In[r][(c+r) mod 4]
// forward and In[r][(c-r) mod 4] inverse; row 0 is never moved. The block is
// byte wiring with a 2:1 mux per byte for the direction. Rows 0 and 2 come
// out the same in both directions, so half of the outputs are plain wires
// from the input; that is inherent to the transform.
// Ports: din, inv (0 = ShiftRows, 1 = InvShiftRows), dout. Combinational.
module aes_shift_rows
  import aes_pkg::*;
(
  input  block_t din,
  input  logic   inv,
  output block_t dout
);

  always_comb begin
    for (int c = 0; c < 4; c++) begin
      for (int r = 0; r < 4; r++) begin
        dout[127-8*(4*c+r) -: 8] = inv ? din[127-8*(4*((c+4-r)%4)+r) -: 8]
                                       : din[127-8*(4*((c+r)%4)+r) -: 8];
      end
    end
  end

endmodule
