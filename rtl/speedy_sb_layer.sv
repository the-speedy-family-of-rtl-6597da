// speedy_sb_layer: SubBox (SB), the non-linear layer of SPEEDY.
//
// Applies the 6-bit S-box to every row of the l x 6 state: row i (bits [i,0..5],
// vector positions 6l-1-6i down to 6l-6-6i) goes through its own speedy_sbox with
// column 0 as the S-box MSB. l S-boxes in parallel, purely combinational, as the
// cipher specifies; no choices of this design are involved.
module speedy_sb_layer #(
  parameter int unsigned ROWS = speedy_pkg::DEFAULT_ROWS
) (
  input  logic [6*ROWS-1:0] x,
  output logic [6*ROWS-1:0] y
);

  localparam int unsigned W = 6 * ROWS;

  for (genvar i = 0; i < ROWS; i++) begin : g_row
    speedy_sbox u_sbox (
      .x (x[W-1-6*i -: 6]),
      .y (y[W-1-6*i -: 6])
    );
  end

endmodule
