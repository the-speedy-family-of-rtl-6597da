// tb_speedy_shift_columns: ShiftColumns and its inverse against the index formulas, single-bit walks and random states, plus the round trip.
module tb_speedy_shift_columns;
  import speedy_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  st_t x, y, yi, back, exp_y;
  speedy_shift_columns #(.INVERSE(1'b0)) dut_f (.x(x), .y(y));
  speedy_shift_columns #(.INVERSE(1'b1)) dut_i (.x(x), .y(yi));
  speedy_shift_columns #(.INVERSE(1'b1)) dut_b (.x(y), .y(back));

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
      exp_y = sc(x);
      checks++;
      if (y !== exp_y) begin failures++; $display("FAIL SC(%h) = %h, expected %h", x, y, exp_y); end
      exp_y = sc_inv(x);
      checks++;
      if (yi !== exp_y) begin failures++; $display("FAIL SC^-1(%h) = %h, expected %h", x, yi, exp_y); end
      checks++;
      if (back !== x) begin failures++; $display("FAIL SC^-1(SC(x)) != x for %h", x); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
