// tb_speedy_sbox_inv: exhaustive check that the inverse S-box undoes the S-box table.
module tb_speedy_sbox_inv;
  import speedy_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [5:0] y, x;
  speedy_sbox_inv dut (.y(y), .x(x));

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 64; v++) begin
      y = SBOX[v];
      #1;
      checks++;
      if (x !== 6'(v)) begin
        failures++;
        $display("FAIL S^-1(%02h) = %02h, expected %02h", y, x, v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
