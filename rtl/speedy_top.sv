// speedy_top: single-cycle SPEEDY-r-192 encryption and decryption units.
//
// SPEEDY is a block cipher built for the lowest possible latency in CMOS: the whole
// cipher is one unrolled combinational circuit, meant to sit between two register
// stages and finish within a single clock cycle. This top holds two such units side
// by side, each with its own ports:
//   * encryption: enc_plaintext/enc_key -> input registers -> speedy_encrypt ->
//     output register -> enc_ciphertext
//   * decryption: dec_ciphertext/dec_key -> input registers -> speedy_decrypt ->
//     output register -> dec_plaintext
// Timing: a block whose *_in_valid is high at rising edge N is captured at edge N,
// passes the cipher during cycle N..N+1 and appears with *_out_valid at edge N+1.
// A new block can enter every cycle (throughput one block per cycle per unit); there
// is no back-pressure. rst_n is an asynchronous active-low reset of all registers.
// The register-to-register placement follows the cipher's evaluation setup; the
// valid signals, reset and the decryption unit's presence in the top are this
// design's choices.
module speedy_top #(
  parameter int unsigned ROUNDS = speedy_pkg::DEFAULT_ROUNDS,
  parameter int unsigned ROWS   = speedy_pkg::DEFAULT_ROWS
) (
  input  logic              clk,
  input  logic              rst_n,
  // encryption unit
  input  logic              enc_in_valid,
  input  logic [6*ROWS-1:0] enc_plaintext,
  input  logic [6*ROWS-1:0] enc_key,
  output logic              enc_out_valid,
  output logic [6*ROWS-1:0] enc_ciphertext,
  // decryption unit
  input  logic              dec_in_valid,
  input  logic [6*ROWS-1:0] dec_ciphertext,
  input  logic [6*ROWS-1:0] dec_key,
  output logic              dec_out_valid,
  output logic [6*ROWS-1:0] dec_plaintext
);

  localparam int unsigned W = 6 * ROWS;

  // ---------------- encryption unit ----------------
  logic         enc_v_q;
  logic [W-1:0] enc_pt_q, enc_key_q, enc_ct_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      enc_v_q   <= 1'b0;
      enc_pt_q  <= '0;
      enc_key_q <= '0;
    end else begin
      enc_v_q <= enc_in_valid;
      if (enc_in_valid) begin
        enc_pt_q  <= enc_plaintext;
        enc_key_q <= enc_key;
      end
    end
  end

  speedy_encrypt #(.ROUNDS(ROUNDS), .ROWS(ROWS)) u_enc (
    .plaintext  (enc_pt_q),
    .key        (enc_key_q),
    .ciphertext (enc_ct_d)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      enc_out_valid  <= 1'b0;
      enc_ciphertext <= '0;
    end else begin
      enc_out_valid <= enc_v_q;
      if (enc_v_q) enc_ciphertext <= enc_ct_d;
    end
  end

  // ---------------- decryption unit ----------------
  logic         dec_v_q;
  logic [W-1:0] dec_ct_q, dec_key_q, dec_pt_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dec_v_q   <= 1'b0;
      dec_ct_q  <= '0;
      dec_key_q <= '0;
    end else begin
      dec_v_q <= dec_in_valid;
      if (dec_in_valid) begin
        dec_ct_q  <= dec_ciphertext;
        dec_key_q <= dec_key;
      end
    end
  end

  speedy_decrypt #(.ROUNDS(ROUNDS), .ROWS(ROWS)) u_dec (
    .ciphertext (dec_ct_q),
    .key        (dec_key_q),
    .plaintext  (dec_pt_d)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dec_out_valid <= 1'b0;
      dec_plaintext <= '0;
    end else begin
      dec_out_valid <= dec_v_q;
      if (dec_v_q) dec_plaintext <= dec_pt_d;
    end
  end

endmodule
