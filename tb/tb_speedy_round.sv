// tb_speedy_round: one inner round (SB, SC, SB, SC, MC, constant, next key) against
// the reference operations on random states, then the diffusion property of the round:
// for every input bit, flipping it in 4000 random states must change every one of the
// 192 output bits at least once (each output bit depends on the whole input).
module tb_speedy_round;
  import speedy_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  st_t x, kn, rcv, y, exp_y;
  speedy_round dut (.state_in(x), .key_next(kn), .rc(rcv), .state_out(y));

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic st_t rnd();
    return {$urandom(), $urandom(), $urandom(), $urandom(), $urandom(), $urandom()};
  endfunction

  initial begin
    for (int n = 0; n < 200; n++) begin
      x = rnd(); kn = rnd(); rcv = rc(n % 5);
      #1;
      exp_y = mc(sc(sb(sc(sb(x))))) ^ rcv ^ kn;
      checks++;
      if (y !== exp_y) begin failures++; $display("FAIL round(%h) = %h, expected %h", x, y, exp_y); end
    end
    kn = '0; rcv = '0;
    for (int b = 0; b < W; b++) begin
      st_t base, reach;
      reach = '0;
      for (int n = 0; n < 4000; n++) begin
        x = rnd();
        #1;
        base = y;
        x[b] = ~x[b];
        #1;
        reach |= base ^ y;
      end
      checks++;
      if (reach !== '1) begin
        failures++; $display("FAIL input bit %0d does not reach outputs %h", b, ~reach);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
