// speedy_sbox: the 6-bit SPEEDY S-box as six two-level NAND trees.
//
// Function: y = S(x), a bijection on 6 bits with uniformity 8 and linearity 24.
// x_0 (port bit 5) is the most significant input bit, y_0 (port bit 5) the most
// significant output bit.
//
// Structure (follows the cipher's gate-level description): every input bit is
// available true and inverted (the inverters double as the fan-out buffers of the
// input nets). Each output coordinate y_k is the sum of four product terms; each
// product term is one first-level NAND2/NAND3 whose output drives only the
// second-level NAND4 of its coordinate (fan-out 1), and the NAND4 output is y_k
// itself, so no output inverter is needed:
//   y_k = NAND4( NAND(term0), NAND(term1), NAND(term2), NAND(term3) ).
// Purely combinational; depth = input inverter + two NAND levels.
module speedy_sbox (
  input  logic [5:0] x,
  output logic [5:0] y
);

  logic [0:5] a;   // a[k] = x_k (true polarity)
  logic [0:5] n;   // n[k] = not x_k (input inverter)
  logic [0:5] b;   // b[k] = y_k

  assign a = x;
  assign n = ~x;

  // y_0 = x3.~x5 + x3.x4.x2 + ~x3.x1.x0 + x5.x4.x1
  assign b[0] = ~&{ ~&{a[3], n[5]}, ~&{a[3], a[4], a[2]},
                    ~&{n[3], a[1], a[0]}, ~&{a[5], a[4], a[1]} };
  // y_1 = x5.x3.~x2 + ~x5.x3.~x4 + x5.x2.x0 + ~x3.~x0.x1
  assign b[1] = ~&{ ~&{a[5], a[3], n[2]}, ~&{n[5], a[3], n[4]},
                    ~&{a[5], a[2], a[0]}, ~&{n[3], n[0], a[1]} };
  // y_2 = ~x3.x0.x4 + x3.x0.x1 + ~x3.~x4.x2 + ~x0.~x2.~x5
  assign b[2] = ~&{ ~&{n[3], a[0], a[4]}, ~&{a[3], a[0], a[1]},
                    ~&{n[3], n[4], a[2]}, ~&{n[0], n[2], n[5]} };
  // y_3 = ~x0.x2.~x3 + x0.x2.x4 + x0.~x2.x5 + ~x0.x3.x1
  assign b[3] = ~&{ ~&{n[0], a[2], n[3]}, ~&{a[0], a[2], a[4]},
                    ~&{a[0], n[2], a[5]}, ~&{n[0], a[3], a[1]} };
  // y_4 = x0.~x3 + x0.~x4.~x2 + ~x0.x4.x5 + ~x4.~x2.x1
  assign b[4] = ~&{ ~&{a[0], n[3]}, ~&{a[0], n[4], n[2]},
                    ~&{n[0], a[4], a[5]}, ~&{n[4], n[2], a[1]} };
  // y_5 = x2.x5 + ~x2.~x1.x4 + x2.x1.x0 + ~x1.x0.x3
  assign b[5] = ~&{ ~&{a[2], a[5]}, ~&{n[2], n[1], a[4]},
                    ~&{a[2], a[1], a[0]}, ~&{n[1], a[0], a[3]} };

  assign y = b;

endmodule
