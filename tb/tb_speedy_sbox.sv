// tb_speedy_sbox: exhaustive check of the NAND-tree S-box against the 64-entry
// S-box table, plus the S-box properties the cipher is built on, computed from the
// outputs of the device: bijectivity, differential uniformity 8, linearity 24 and the
// algebraic degrees 5,3,3,3,4,5 of the coordinates y_0..y_5, and the 1-bit to 1-bit
// differential probabilities (x 2^-5) and linear correlations (x 2^-4) published for
// the S-box. Combinational; a small
// clock drives the watchdog only.
module tb_speedy_sbox;
  import speedy_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [5:0] x, y;
  logic [63:0] seen;
  logic [5:0]  s [64];
  localparam int DEG [6] = '{5, 3, 3, 3, 4, 5};
  // 1-bit to 1-bit tables, row = input bit x_i, column = output bit y_j
  localparam int DIFF1 [6][6] = '{'{0,1,3,2,1,1}, '{4,3,4,4,0,0}, '{1,1,3,3,1,1},
                                  '{1,3,0,2,3,0}, '{2,2,4,4,2,1}, '{2,4,2,4,0,2}};
  localparam int LIN1  [6][6] = '{'{3,0,4,0,4,4}, '{6,4,4,4,2,4}, '{1,0,0,4,4,6},
                                  '{6,4,4,0,6,2}, '{4,4,0,4,0,3}, '{4,4,4,4,4,5}};

  function automatic int popc6(logic [5:0] v);
    return $countones(v);
  endfunction
  speedy_sbox dut (.x(x), .y(y));

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int v = 0; v < 64; v++) begin
      x = 6'(v);
      #1;
      checks++;
      if (y !== SBOX[v]) begin
        failures++;
        $display("FAIL S(%02h) = %02h, expected %02h", v, y, SBOX[v]);
      end
      seen[y] = 1'b1;
      s[v] = y;
    end
    begin : props
      int uni, lin, cnt, acc, d;
      logic [63:0] anf;
      uni = 0;
      for (int a = 1; a < 64; a++)
        for (int b = 0; b < 64; b++) begin
          cnt = 0;
          for (int v = 0; v < 64; v++) if ((s[v] ^ s[v ^ a]) == 6'(b)) cnt++;
          if (cnt > uni) uni = cnt;
        end
      lin = 0;
      for (int a = 0; a < 64; a++)
        for (int b = 1; b < 64; b++) begin
          acc = 0;
          for (int v = 0; v < 64; v++)
            acc += ((popc6(6'(a) & 6'(v)) + popc6(6'(b) & s[v])) % 2 == 0) ? 1 : -1;
          if (acc < 0) acc = -acc;
          if (acc > lin) lin = acc;
        end
      checks++;
      if (uni != 8) begin failures++; $display("FAIL uniformity %0d, expected 8", uni); end
      checks++;
      if (lin != 24) begin failures++; $display("FAIL linearity %0d, expected 24", lin); end
      // 1-bit to 1-bit: probability = count/64 = DIFF1 * 2^-5, correlation = sum/64 = LIN1 * 2^-4
      for (int i = 0; i < 6; i++)
        for (int j = 0; j < 6; j++) begin
          cnt = 0; acc = 0;
          for (int v = 0; v < 64; v++) begin
            if ((s[v] ^ s[v ^ (32 >> i)]) == 6'(32 >> j)) cnt++;
            acc += ((v >> (5 - i)) % 2 == s[v][5-j]) ? 1 : -1;
          end
          if (acc < 0) acc = -acc;
          checks++;
          if (cnt != 2 * DIFF1[i][j] || acc != 4 * LIN1[i][j]) begin
            failures++;
            $display("FAIL 1-bit entry (%0d,%0d): count %0d, |sum| %0d", i, j, cnt, acc);
          end
        end
      // algebraic degree of each coordinate via the binary Moebius transform
      for (int k = 0; k < 6; k++) begin
        for (int v = 0; v < 64; v++) anf[v] = s[v][5-k];
        for (int st = 1; st < 64; st <<= 1)
          for (int v = 0; v < 64; v++) if ((v & st) != 0) anf[v] ^= anf[v ^ st];
        d = 0;
        for (int v = 0; v < 64; v++) if (anf[v] && popc6(6'(v)) > d) d = popc6(6'(v));
        checks++;
        if (d != DEG[k]) begin failures++; $display("FAIL degree of y_%0d is %0d, expected %0d", k, d, DEG[k]); end
      end
    end
    checks++;
    if (seen != '1) begin
      failures++;
      $display("FAIL S-box is not a bijection");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
