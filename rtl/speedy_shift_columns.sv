// speedy_shift_columns: ShiftColumns (SC) and its inverse.
//
// SC rotates column j of the l x 6 state upward by j rows: y[i,j] = x[i+j mod l, j].
// With INVERSE = 1 the rotation is reversed, y[i,j] = x[i-j mod l, j], as needed by
// decryption. Pure wiring, no gates: it places the six outputs of one S-box of the
// first SB layer into six different S-boxes of the second. The forward mapping is
// the cipher's; the INVERSE option is this design's addition for the decryption core.
module speedy_shift_columns #(
  parameter int unsigned ROWS    = speedy_pkg::DEFAULT_ROWS,
  parameter bit          INVERSE = 1'b0
) (
  input  logic [6*ROWS-1:0] x,
  output logic [6*ROWS-1:0] y
);

  import speedy_pkg::pos;

  for (genvar i = 0; i < ROWS; i++) begin : g_row
    for (genvar j = 0; j < 6; j++) begin : g_col
      localparam int unsigned SRC = INVERSE ? (i + ROWS - j) % ROWS : (i + j) % ROWS;
      assign y[pos(ROWS, i, j)] = x[pos(ROWS, SRC, j)];
    end
  end

endmodule
