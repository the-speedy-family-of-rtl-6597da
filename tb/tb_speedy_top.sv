// tb_speedy_top: end-to-end test of speedy_top at its default parameters
// (SPEEDY-6-192 encryption and decryption units).
//
// A random stream of blocks enters the encryption unit with random idle gaps; every
// ciphertext is compared with the reference model and must appear exactly two clock
// edges after its inputs were presented (one edge into the input registers, one cycle
// through the cipher into the output register). Each ciphertext is fed straight back
// into the decryption unit with its key and must return the original plaintext; when
// no ciphertext is available, the decryption unit gets a reference ciphertext of a
// fresh random block instead. A reset in the middle of the stream must drop the blocks
// in flight. The test counts how often each of these situations occurred and fails if
// one never did.
module tb_speedy_top;
  import speedy_ref_pkg::*;

  localparam int ROUNDS  = 6;
  localparam int NCYCLES = 3000;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int cyc = 0;

  logic rst_n;
  logic enc_in_valid, enc_out_valid, dec_in_valid, dec_out_valid;
  st_t  enc_plaintext, enc_key, enc_ciphertext;
  st_t  dec_ciphertext, dec_key, dec_plaintext;

  speedy_top dut (
    .clk, .rst_n,
    .enc_in_valid, .enc_plaintext, .enc_key, .enc_out_valid, .enc_ciphertext,
    .dec_in_valid, .dec_ciphertext, .dec_key, .dec_out_valid, .dec_plaintext
  );

  typedef struct {
    st_t pt;
    st_t key;
    st_t ct;
    int  cyc;
  } item_t;

  item_t enc_q[$], dec_q[$];

  // mechanism counters
  int n_enc = 0, n_dec = 0, n_back_to_back = 0, n_gap = 0, n_round_trip = 0;
  int n_both = 0, n_reset_flush = 0;

  function automatic st_t rnd();
    return {$urandom(), $urandom(), $urandom(), $urandom(), $urandom(), $urandom()};
  endfunction

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (NCYCLES + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    item_t it, rt;
    bit    prev_enc_valid, have_rt;
    rst_n = 1'b0;
    enc_in_valid = 1'b0; dec_in_valid = 1'b0;
    enc_plaintext = '0; enc_key = '0; dec_ciphertext = '0; dec_key = '0;
    prev_enc_valid = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    while (cyc < NCYCLES) begin
      @(negedge clk);

      // ---- check outputs registered at the last rising edge ----
      have_rt = 1'b0;
      if (enc_out_valid) begin
        checks++;
        if (enc_q.size() == 0) begin
          failures++; $display("FAIL cycle %0d: ciphertext with no block in flight", cyc);
        end else begin
          it = enc_q.pop_front();
          if (enc_ciphertext !== it.ct) begin
            failures++;
            $display("FAIL cycle %0d: ciphertext %h, expected %h", cyc, enc_ciphertext, it.ct);
          end
          checks++;
          if (cyc - it.cyc != 2) begin
            failures++; $display("FAIL cycle %0d: encryption latency %0d edges", cyc, cyc - it.cyc);
          end
          n_enc++;
          rt = it; rt.ct = enc_ciphertext; have_rt = 1'b1;
        end
      end
      if (dec_out_valid) begin
        checks++;
        if (dec_q.size() == 0) begin
          failures++; $display("FAIL cycle %0d: plaintext with no block in flight", cyc);
        end else begin
          it = dec_q.pop_front();
          if (dec_plaintext !== it.pt) begin
            failures++;
            $display("FAIL cycle %0d: plaintext %h, expected %h", cyc, dec_plaintext, it.pt);
          end
          checks++;
          if (cyc - it.cyc != 2) begin
            failures++; $display("FAIL cycle %0d: decryption latency %0d edges", cyc, cyc - it.cyc);
          end
          n_dec++;
        end
      end

      // ---- mid-stream reset: blocks in flight are dropped ----
      if (cyc == NCYCLES / 2) begin
        enc_in_valid = 1'b1; enc_plaintext = rnd(); enc_key = rnd();
        dec_in_valid = 1'b1;
        @(posedge clk);
        #1 rst_n = 1'b0;
        #1;
        checks++;
        if (enc_out_valid || dec_out_valid) begin
          failures++; $display("FAIL reset did not clear the valid outputs");
        end
        enc_q.delete(); dec_q.delete();
        @(negedge clk);
        enc_in_valid = 1'b0; dec_in_valid = 1'b0;
        @(negedge clk);
        rst_n = 1'b1;
        @(negedge clk);
        @(negedge clk);
        checks++;
        if (enc_out_valid || dec_out_valid) begin
          failures++; $display("FAIL a block survived the reset");
        end else n_reset_flush++;
        prev_enc_valid = 1'b0;
        continue;
      end

      // ---- drive the encryption unit ----
      enc_in_valid = ($urandom_range(0, 3) != 0);
      if (enc_in_valid) begin
        it.pt = rnd(); it.key = rnd();
        it.ct = encrypt(it.pt, it.key, ROUNDS);
        it.cyc = cyc;
        enc_plaintext = it.pt; enc_key = it.key;
        enc_q.push_back(it);
        if (prev_enc_valid) n_back_to_back++;
      end else begin
        enc_plaintext = rnd(); enc_key = rnd();   // ignored by the unit
        if (prev_enc_valid) n_gap++;
      end
      prev_enc_valid = enc_in_valid;

      // ---- drive the decryption unit ----
      if (have_rt) begin
        rt.cyc = cyc;
        dec_in_valid = 1'b1; dec_ciphertext = rt.ct; dec_key = rt.key;
        dec_q.push_back(rt);
        n_round_trip++;
      end else if ($urandom_range(0, 1) != 0) begin
        it.pt = rnd(); it.key = rnd();
        it.ct = encrypt(it.pt, it.key, ROUNDS);
        it.cyc = cyc;
        dec_in_valid = 1'b1; dec_ciphertext = it.ct; dec_key = it.key;
        dec_q.push_back(it);
      end else begin
        dec_in_valid = 1'b0;
      end
      if (enc_in_valid && dec_in_valid) n_both++;
    end

    $display("mechanisms: encrypted=%0d decrypted=%0d back_to_back=%0d idle_gap=%0d round_trip=%0d enc_and_dec=%0d reset_flush=%0d",
             n_enc, n_dec, n_back_to_back, n_gap, n_round_trip, n_both, n_reset_flush);
    checks += 7;
    if (n_enc == 0)          begin failures++; $display("FAIL no block encrypted"); end
    if (n_dec == 0)          begin failures++; $display("FAIL no block decrypted"); end
    if (n_back_to_back == 0) begin failures++; $display("FAIL no back-to-back blocks"); end
    if (n_gap == 0)          begin failures++; $display("FAIL no idle gap"); end
    if (n_round_trip == 0)   begin failures++; $display("FAIL no round trip"); end
    if (n_both == 0)         begin failures++; $display("FAIL units never busy together"); end
    if (n_reset_flush == 0)  begin failures++; $display("FAIL reset never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
