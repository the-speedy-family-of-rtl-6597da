// speedy_round: one inner SPEEDY round R_r (0 <= r <= ROUNDS-2), unrolled.
//
// R_r = A_cr o MC o SC o SB o SC o SB o A_kr. The key addition A_kr at the start of
// the round is done by the previous stage (the initial key XOR, or the merged XOR tree
// of the previous round), so this block starts from the keyed state and ends with the
// merged MixColumns / constant / next-key tree:
//   state_out = A_k(r+1)( A_cr( MC( SC( SB( SC( SB(state_in) ))))))
// Critical path: two S-box layers (two NAND levels each) and three XOR levels.
// Combinational; the round boundary placement is this design's choice.
module speedy_round #(
  parameter int unsigned ROWS = speedy_pkg::DEFAULT_ROWS
) (
  input  logic [6*ROWS-1:0] state_in,   // state after A_kr
  input  logic [6*ROWS-1:0] key_next,   // k_(r+1)
  input  logic [6*ROWS-1:0] rc,         // c_r
  output logic [6*ROWS-1:0] state_out   // state after A_k(r+1)
);

  logic [6*ROWS-1:0] sb1, sc1, sb2, sc2;

  speedy_sb_layer      #(.ROWS(ROWS)) u_sb1 (.x(state_in), .y(sb1));
  speedy_shift_columns #(.ROWS(ROWS)) u_sc1 (.x(sb1),      .y(sc1));
  speedy_sb_layer      #(.ROWS(ROWS)) u_sb2 (.x(sc1),      .y(sb2));
  speedy_shift_columns #(.ROWS(ROWS)) u_sc2 (.x(sb2),      .y(sc2));
  speedy_mc_ark        #(.ROWS(ROWS)) u_mc  (.x(sc2), .key(key_next), .rc(rc), .y(state_out));

endmodule
