// tb_speedy_sb_layer: random states through the SubBox layer, compared with the table-based S-box applied row by row; also the all-zero and all-one states.
module tb_speedy_sb_layer;
  import speedy_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  st_t x, y, exp_y;
  speedy_sb_layer dut (.x(x), .y(y));

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
    for (int n = 0; n < 202; n++) begin
      x = (n == 0) ? '0 : (n == 1) ? '1 : rnd();
      #1;
      exp_y = sb(x);
      checks++;
      if (y !== exp_y) begin
        failures++;
        $display("FAIL SB(%h) = %h, expected %h", x, y, exp_y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
