// speedy_decrypt: fully-unrolled SPEEDY-r-6l decryption, the inverse of speedy_encrypt.
//
// Takes the same master key as encryption; round keys k_0..k_r are produced forward by
// the same wiring-only key schedule. The rounds are undone in reverse order:
//   t_(r-1)   = SB^-1(SC^-1(SB^-1(ciphertext ^ k_r))) ^ k_(r-1)
//   t_q       = SB^-1(SC^-1(SB^-1(SC^-1(MC^-1(t_(q+1) ^ c_q))))) ^ k_q,  q = r-2 .. 0
//   plaintext = t_0
// The constant XOR cannot be merged into the (19-tap) inverse MixColumns without
// moving it through the matrix, so it stays a separate XOR. The cipher gives only
// the cost of its decryption; this inverse data path is derived from the encryption
// and is this design's. Combinational; the default taps of MC^-1 require l = 32.
module speedy_decrypt #(
  parameter int unsigned ROUNDS = speedy_pkg::DEFAULT_ROUNDS,
  parameter int unsigned ROWS   = speedy_pkg::DEFAULT_ROWS
) (
  input  logic [6*ROWS-1:0] ciphertext,
  input  logic [6*ROWS-1:0] key,
  output logic [6*ROWS-1:0] plaintext
);

  localparam int unsigned W = 6 * ROWS;

  if (ROUNDS < 1 || ROUNDS > speedy_pkg::max_rounds(ROWS)) begin : g_bad_rounds
    $error("speedy_decrypt: ROUNDS outside the range covered by the round constants");
  end

  logic [W-1:0] rk [ROUNDS+1];
  logic [W-1:0] t  [ROUNDS];   // t[q]: state at the start of round q, before A_kq is undone

  speedy_key_schedule #(.ROUNDS(ROUNDS), .ROWS(ROWS)) u_ks (.key(key), .round_keys(rk));

  // Undo the last round
  begin : g_last
    logic [W-1:0] a, b, c, d;
    assign a = ciphertext ^ rk[ROUNDS];
    speedy_inv_sb_layer  #(.ROWS(ROWS))                 u_isb2 (.x(a), .y(b));
    speedy_shift_columns #(.ROWS(ROWS), .INVERSE(1'b1)) u_isc  (.x(b), .y(c));
    speedy_inv_sb_layer  #(.ROWS(ROWS))                 u_isb1 (.x(c), .y(d));
    assign t[ROUNDS-1] = d ^ rk[ROUNDS-1];
  end

  // Undo the inner rounds, last to first
  for (genvar q = 0; q < ROUNDS - 1; q++) begin : g_round
    localparam logic [W-1:0] RC = speedy_pkg::PI_FRAC[q*W +: W];
    logic [W-1:0] m, a, b, c, d, e;
    assign a = t[q+1] ^ RC;
    speedy_inv_mix_columns #(.ROWS(ROWS))                 u_imc  (.x(a), .y(m));
    speedy_shift_columns   #(.ROWS(ROWS), .INVERSE(1'b1)) u_isc2 (.x(m), .y(b));
    speedy_inv_sb_layer    #(.ROWS(ROWS))                 u_isb2 (.x(b), .y(c));
    speedy_shift_columns   #(.ROWS(ROWS), .INVERSE(1'b1)) u_isc1 (.x(c), .y(d));
    speedy_inv_sb_layer    #(.ROWS(ROWS))                 u_isb1 (.x(d), .y(e));
    assign t[q] = e ^ rk[q];
  end

  assign plaintext = t[0];

endmodule
