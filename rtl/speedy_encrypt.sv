// speedy_encrypt: fully-unrolled SPEEDY-r-6l encryption, one combinational circuit.
//
// Data path (r = ROUNDS):
//   s_0       = plaintext ^ k_0                                   (initial key XOR)
//   s_(q+1)   = speedy_round(s_q, k_(q+1), c_q),  q = 0 .. r-2     (inner rounds)
//   ciphertext = SB(SC(SB(s_(r-1)))) ^ k_r                         (last round)
// The last round drops MixColumns, the second ShiftColumns and the constant, and ends
// with an extra key addition. Round keys come from speedy_key_schedule (wiring only);
// round constant c_q is bits [q*6l, (q+1)*6l) of the binary expansion of pi - 3.
// No clock: the whole cipher settles in one combinational pass; speedy_top puts it
// between register stages. This structure is the cipher's own; the default ROUNDS = 6
// is the instance offering 128-bit security (7 rounds give 192-bit security).
module speedy_encrypt #(
  parameter int unsigned ROUNDS = speedy_pkg::DEFAULT_ROUNDS,
  parameter int unsigned ROWS   = speedy_pkg::DEFAULT_ROWS
) (
  input  logic [6*ROWS-1:0] plaintext,
  input  logic [6*ROWS-1:0] key,
  output logic [6*ROWS-1:0] ciphertext
);

  localparam int unsigned W = 6 * ROWS;

  if (ROUNDS < 1 || ROUNDS > speedy_pkg::max_rounds(ROWS)) begin : g_bad_rounds
    $error("speedy_encrypt: ROUNDS outside the range covered by the round constants");
  end

  logic [W-1:0] rk [ROUNDS+1];
  logic [W-1:0] s  [ROUNDS];
  logic [W-1:0] sb1, sc1, sb2;

  speedy_key_schedule #(.ROUNDS(ROUNDS), .ROWS(ROWS)) u_ks (.key(key), .round_keys(rk));

  assign s[0] = plaintext ^ rk[0];

  for (genvar q = 0; q < ROUNDS - 1; q++) begin : g_round
    localparam logic [W-1:0] RC = speedy_pkg::PI_FRAC[q*W +: W];
    speedy_round #(.ROWS(ROWS)) u_round (
      .state_in  (s[q]),
      .key_next  (rk[q+1]),
      .rc        (RC),
      .state_out (s[q+1])
    );
  end

  // Last round R_(r-1)
  speedy_sb_layer      #(.ROWS(ROWS)) u_last_sb1 (.x(s[ROUNDS-1]), .y(sb1));
  speedy_shift_columns #(.ROWS(ROWS)) u_last_sc  (.x(sb1),         .y(sc1));
  speedy_sb_layer      #(.ROWS(ROWS)) u_last_sb2 (.x(sc1),         .y(sb2));

  assign ciphertext = sb2 ^ rk[ROUNDS];

endmodule
