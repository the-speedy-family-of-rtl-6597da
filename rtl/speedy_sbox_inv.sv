// speedy_sbox_inv: inverse of the 6-bit SPEEDY S-box, used only by decryption.
//
// Function: x = S^-1(y), with bit 5 the most significant bit on both ports.
// Implementation: a 64-entry lookup table. The table is not typed in; it is
// computed at elaboration by evaluating the forward S-box equations (the same
// sum-of-products as speedy_sbox) for every input and storing the input at the
// address of the output. Synthesis turns it into plain combinational logic.
// Decryption latency was never a design goal of the cipher, so no low-depth
// structure is attempted here; the lookup-table form is this design's choice.
module speedy_sbox_inv (
  input  logic [5:0] y,
  output logic [5:0] x
);

  typedef logic [5:0] table_t [64];

  // Forward S-box as a function (same equations as speedy_sbox)
  function automatic logic [5:0] sbox_fwd(logic [5:0] v);
    logic [0:5] p, q, r;
    p = v;
    q = ~v;
    r[0] = (p[3] & q[5]) | (p[3] & p[4] & p[2]) | (q[3] & p[1] & p[0]) | (p[5] & p[4] & p[1]);
    r[1] = (p[5] & p[3] & q[2]) | (q[5] & p[3] & q[4]) | (p[5] & p[2] & p[0]) | (q[3] & q[0] & p[1]);
    r[2] = (q[3] & p[0] & p[4]) | (p[3] & p[0] & p[1]) | (q[3] & q[4] & p[2]) | (q[0] & q[2] & q[5]);
    r[3] = (q[0] & p[2] & q[3]) | (p[0] & p[2] & p[4]) | (p[0] & q[2] & p[5]) | (q[0] & p[3] & p[1]);
    r[4] = (p[0] & q[3]) | (p[0] & q[4] & q[2]) | (q[0] & p[4] & p[5]) | (q[4] & q[2] & p[1]);
    r[5] = (p[2] & p[5]) | (q[2] & q[1] & p[4]) | (p[2] & p[1] & p[0]) | (q[1] & p[0] & p[3]);
    return r;
  endfunction

  function automatic table_t build_inverse();
    table_t t;
    for (int v = 0; v < 64; v++) t[sbox_fwd(6'(v))] = 6'(v);
    return t;
  endfunction

  localparam table_t INV = build_inverse();

  assign x = INV[y];

endmodule
