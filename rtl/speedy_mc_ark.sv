// speedy_mc_ark: MixColumns merged with AddRoundConstant and the next AddRoundKey.
//
// Computes A_k(r+1) o A_cr o MC in one step. MixColumns multiplies every column by
// the cyclic binary matrix 1 + z^a1 + ... + z^a6, so
//   y[i,j] = x[i,j] ^ x[i+a1,j] ^ ... ^ x[i+a6,j] ^ (k[i,j] ^ c[i,j])   (rows mod l).
// The key and constant bits are off the critical path and are combined first; each
// output bit is then an eight-input XOR built as a balanced three-level tree in which
// every gate drives exactly one gate (fan-out 1):
//   ((x0 ^ x1) ^ (x2 ^ x3)) ^ ((x4 ^ x5) ^ (x6 ^ kc)).
// Structure and offsets follow the cipher; purely combinational.
module speedy_mc_ark #(
  parameter int unsigned          ROWS  = speedy_pkg::DEFAULT_ROWS,
  parameter speedy_pkg::mc_alpha_t ALPHA = speedy_pkg::DEFAULT_ALPHA
) (
  input  logic [6*ROWS-1:0] x,
  input  logic [6*ROWS-1:0] key,   // round key k_(r+1)
  input  logic [6*ROWS-1:0] rc,    // round constant c_r
  output logic [6*ROWS-1:0] y
);

  import speedy_pkg::pos;

  logic [6*ROWS-1:0] kc;
  assign kc = key ^ rc;

  for (genvar i = 0; i < ROWS; i++) begin : g_row
    for (genvar j = 0; j < 6; j++) begin : g_col
      logic [7:0] t;   // tree leaves: x[i], x[i+a1] .. x[i+a6], k^c
      assign t[0] = x[pos(ROWS, i, j)];
      for (genvar a = 0; a < 6; a++) begin : g_tap
        assign t[a+1] = x[pos(ROWS, (i + ALPHA[a]) % ROWS, j)];
      end
      assign t[7] = kc[pos(ROWS, i, j)];
      assign y[pos(ROWS, i, j)] = ((t[0] ^ t[1]) ^ (t[2] ^ t[3])) ^ ((t[4] ^ t[5]) ^ (t[6] ^ t[7]));
    end
  end

endmodule
