// tb_speedy_decrypt: the unrolled decryption core for 5, 6 and 7 rounds.
// Ciphertexts are produced by the reference encryption model; the core must return
// the original plaintext. The fixed known-answer ciphertexts are decrypted too.
module tb_speedy_decrypt;
  import speedy_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  st_t ct [3];
  st_t key;
  st_t pt [3];

  speedy_decrypt #(.ROUNDS(5)) dut5 (.ciphertext(ct[0]), .key(key), .plaintext(pt[0]));
  speedy_decrypt #(.ROUNDS(6)) dut6 (.ciphertext(ct[1]), .key(key), .plaintext(pt[1]));
  speedy_decrypt #(.ROUNDS(7)) dut7 (.ciphertext(ct[2]), .key(key), .plaintext(pt[2]));

  localparam st_t KAT_PT  = 192'ha13a632451070e4382a27f26a40682f3fe9ff68028d24fdb;
  localparam st_t KAT_KEY = 192'h764c4f6254e1bff208e95862428faed01584f4207a7e8477;
  localparam st_t KAT_CT [3] = '{
    192'h65cdcac54e49c99f141959c0a1385b879e00dd7e144d4ca8,
    192'hab95d506a9d0916eee882a640f257f87d2b6ab4613add11c,
    192'h0dc194ba6b381b6f363db861403aefe01de2d9318394f673
  };

  function automatic st_t rnd();
    return {$urandom(), $urandom(), $urandom(), $urandom(), $urandom(), $urandom()};
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    st_t p;
    key = KAT_KEY;
    for (int r = 0; r < 3; r++) ct[r] = KAT_CT[r];
    #1;
    for (int r = 0; r < 3; r++) begin
      checks++;
      if (pt[r] !== KAT_PT) begin
        failures++;
        $display("FAIL known answer, %0d rounds: %h, expected %h", r + 5, pt[r], KAT_PT);
      end
    end
    for (int n = 0; n < 100; n++) begin
      p   = rnd();
      key = rnd();
      for (int r = 0; r < 3; r++) ct[r] = encrypt(p, key, r + 5);
      #1;
      for (int r = 0; r < 3; r++) begin
        checks++;
        if (pt[r] !== p) begin
          failures++;
          $display("FAIL %0d rounds: D(%h) = %h, expected %h", r + 5, ct[r], pt[r], p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
