// tb_speedy_inv_mix_columns: inverse MixColumns: MC^-1(MC(x)) = x and MC(MC^-1(x)) = x with the loop-based MixColumns, single-bit walks and random states.
module tb_speedy_inv_mix_columns;
  import speedy_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  st_t x, mx, y1, y2;
  assign mx = mc(x);
  speedy_inv_mix_columns dut1 (.x(mx), .y(y1));
  speedy_inv_mix_columns dut2 (.x(x),  .y(y2));

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
    for (int n = 0; n < 392; n++) begin
      x = (n < W) ? (st_t'(1) << n) : rnd();
      #1;
      checks++;
      if (y1 !== x) begin failures++; $display("FAIL MC^-1(MC(%h)) = %h", x, y1); end
      checks++;
      if (mc(y2) !== x) begin failures++; $display("FAIL MC(MC^-1(%h)) != x", x); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
