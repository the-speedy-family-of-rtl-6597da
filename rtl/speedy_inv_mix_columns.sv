// speedy_inv_mix_columns: inverse of the SPEEDY MixColumns layer (decryption only).
//
// The inverse of the cyclic matrix 1 + z^1 + z^5 + z^9 + z^15 + z^21 + z^26 over
// 32 rows is again cyclic, with w = 19 taps: offset 0 plus
// (4,5,6,7,10,12,14,15,16,18,19,20,21,22,23,24,25,28). Hence
//   y[i,j] = x[i,j] ^ XOR_a x[i+a mod l, j].
// The tap list is the cipher's; a 19-input XOR per bit is left to synthesis to
// balance. Purely combinational. The default taps are valid for l = 32 only.
module speedy_inv_mix_columns #(
  parameter int unsigned              ROWS      = speedy_pkg::DEFAULT_ROWS,
  parameter speedy_pkg::mc_alpha_inv_t ALPHA_INV = speedy_pkg::DEFAULT_ALPHA_INV
) (
  input  logic [6*ROWS-1:0] x,
  output logic [6*ROWS-1:0] y
);

  import speedy_pkg::pos;
  localparam int unsigned TAPS = speedy_pkg::MC_INV_TAPS;

  for (genvar i = 0; i < ROWS; i++) begin : g_row
    for (genvar j = 0; j < 6; j++) begin : g_col
      logic [TAPS:0] t;
      assign t[0] = x[pos(ROWS, i, j)];
      for (genvar a = 0; a < TAPS; a++) begin : g_tap
        assign t[a+1] = x[pos(ROWS, (i + ALPHA_INV[a]) % ROWS, j)];
      end
      assign y[pos(ROWS, i, j)] = ^t;
    end
  end

endmodule
