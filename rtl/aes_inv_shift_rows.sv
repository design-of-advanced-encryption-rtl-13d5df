// InvShiftRows: cyclic right rotation of the state rows, undoing ShiftRows.
//
// Row 0 stays, row 1 rotates right by one byte, row 2 by two and row 3 by
// three: the byte at row r, column c moves to column (c + r) mod 4. Pure
// wiring, combinational. Interface: 128-bit state in and out.
// Follows the AES InvShiftRows step exactly.
module aes_inv_shift_rows
  import aes_pkg::*;
(
  input  block_t state_in,
  output block_t state_out
);

  always_comb begin
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        state_out[127 - 8*(r + 4*c) -: 8] = get_byte(state_in, r, (c + 4 - r) % 4);
  end

endmodule
