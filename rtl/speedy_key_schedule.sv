// speedy_key_schedule: SPEEDY round keys k_0 .. k_ROUNDS from the master key.
//
// k_0 is the master key; k_(r+1) = PB(k_r), where the bit permutation PB moves the
// bit at position p = 6i+j (counted from the MSB) to position (BETA*p + GAMMA) mod 6l.
// For SPEEDY-r-192, BETA = 7 and GAMMA = 1 (bit 0 -> 1, bit 1 -> 8, ..., bit 137 -> 0).
// The schedule is linear and is only wiring: no gates, no latency. All ROUNDS+1
// keys are produced at once for the unrolled datapath. BETA must be coprime to 6l.
// The permutation is the cipher's; the all-keys-at-once interface is this design's.
module speedy_key_schedule #(
  parameter int unsigned ROUNDS = speedy_pkg::DEFAULT_ROUNDS,
  parameter int unsigned ROWS   = speedy_pkg::DEFAULT_ROWS,
  parameter int unsigned BETA   = speedy_pkg::DEFAULT_BETA,
  parameter int unsigned GAMMA  = speedy_pkg::DEFAULT_GAMMA
) (
  input  logic [6*ROWS-1:0] key,
  output logic [6*ROWS-1:0] round_keys [ROUNDS+1]
);

  localparam int unsigned W = 6 * ROWS;

  assign round_keys[0] = key;

  for (genvar r = 0; r < ROUNDS; r++) begin : g_round
    for (genvar p = 0; p < W; p++) begin : g_bit
      localparam int unsigned DST = (BETA * p + GAMMA) % W;
      assign round_keys[r+1][W-1-DST] = round_keys[r][W-1-p];
    end
  end

endmodule
