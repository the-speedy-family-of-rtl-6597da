// speedy_inv_sb_layer: inverse SubBox layer (decryption only).
//
// Applies the inverse 6-bit S-box to every row of the l x 6 state, row i at vector
// positions 6l-1-6i down to 6l-6-6i with column 0 as the MSB. Combinational. It is
// the exact inverse of the cipher's SubBox layer; its use in a decryption core is
// this design's.
module speedy_inv_sb_layer #(
  parameter int unsigned ROWS = speedy_pkg::DEFAULT_ROWS
) (
  input  logic [6*ROWS-1:0] x,
  output logic [6*ROWS-1:0] y
);

  localparam int unsigned W = 6 * ROWS;

  for (genvar i = 0; i < ROWS; i++) begin : g_row
    speedy_sbox_inv u_sbox_inv (
      .y (x[W-1-6*i -: 6]),
      .x (y[W-1-6*i -: 6])
    );
  end

endmodule
