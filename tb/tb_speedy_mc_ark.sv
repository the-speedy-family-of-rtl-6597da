// tb_speedy_mc_ark: merged MixColumns / round constant / round key XOR against the loop-based MixColumns, with single-bit walks and random states.
module tb_speedy_mc_ark;
  import speedy_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  st_t x, key, rcv, y, exp_y;
  speedy_mc_ark dut (.x(x), .key(key), .rc(rcv), .y(y));

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
      x   = (n < W) ? (st_t'(1) << n) : rnd();
      key = (n < W) ? '0 : rnd();
      rcv = (n < W) ? '0 : rc(n % 5);
      #1;
      exp_y = mc(x) ^ key ^ rcv;
      checks++;
      if (y !== exp_y) begin failures++; $display("FAIL MC-ARK(%h) = %h, expected %h", x, y, exp_y); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
