// tb_speedy_key_schedule: round keys k_0..k_6 against repeated application of the bit permutation formula, and spot checks of the permutation table (0->1, 27->190, 28->5, 137->0, 191->186).
module tb_speedy_key_schedule;
  import speedy_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  st_t key;
  st_t rk [7];
  st_t k;
  speedy_key_schedule dut (.key(key), .round_keys(rk));
  localparam int SRC [5] = '{0, 27, 28, 137, 191};
  localparam int DST [5] = '{1, 190, 5, 0, 186};

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic st_t rnd();
    return {$urandom(), $urandom(), $urandom(), $urandom(), $urandom(), $urandom()};
  endfunction

  initial begin
    for (int s = 0; s < 5; s++) begin
      key = st_t'(1) << (W - 1 - SRC[s]);
      #1;
      checks++;
      if (rk[1] !== (st_t'(1) << (W - 1 - DST[s]))) begin
        failures++; $display("FAIL bit %0d does not move to %0d", SRC[s], DST[s]);
      end
    end
    for (int n = 0; n < 100; n++) begin
      key = rnd();
      #1;
      k = key;
      for (int r = 0; r <= 6; r++) begin
        checks++;
        if (rk[r] !== k) begin failures++; $display("FAIL k_%0d = %h, expected %h", r, rk[r], k); end
        k = pb(k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
