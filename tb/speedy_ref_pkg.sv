// speedy_ref_pkg: untimed reference model of SPEEDY-r-192 for the testbenches.
//
// Written independently of the RTL: the S-box is the 64-entry table of the cipher
// specification (not the NAND equations), the linear layers are loops over the
// index formulas, and the round constants are kept as 64-bit words. Bit [i,j] of a
// 192-bit state is bit 191-(6i+j), i.e. bit [0,0] is the MSB.
package speedy_ref_pkg;

  localparam int L = 32;
  localparam int W = 192;
  typedef logic [W-1:0] st_t;

  localparam logic [5:0] SBOX [64] = '{
    6'h08, 6'h00, 6'h09, 6'h03, 6'h38, 6'h10, 6'h29, 6'h13, 6'h0c, 6'h0d, 6'h04, 6'h07, 6'h30, 6'h01, 6'h20, 6'h23,
    6'h1a, 6'h12, 6'h18, 6'h32, 6'h3e, 6'h16, 6'h2c, 6'h36, 6'h1c, 6'h1d, 6'h14, 6'h37, 6'h34, 6'h05, 6'h24, 6'h27,
    6'h02, 6'h06, 6'h0b, 6'h0f, 6'h33, 6'h17, 6'h21, 6'h15, 6'h0a, 6'h1b, 6'h0e, 6'h1f, 6'h31, 6'h11, 6'h25, 6'h35,
    6'h22, 6'h26, 6'h2a, 6'h2e, 6'h3a, 6'h1e, 6'h28, 6'h3c, 6'h2b, 6'h3b, 6'h2f, 6'h3f, 6'h39, 6'h19, 6'h2d, 6'h3d
  };

  localparam logic [63:0] PI_WORDS [24] = '{
    64'h243f6a8885a308d3, 64'h13198a2e03707344, 64'ha4093822299f31d0, 64'h082efa98ec4e6c89,
    64'h452821e638d01377, 64'hbe5466cf34e90c6c, 64'hc0ac29b7c97c50dd, 64'h3f84d5b5b5470917,
    64'h9216d5d98979fb1b, 64'hd1310ba698dfb5ac, 64'h2ffd72dbd01adfb7, 64'hb8e1afed6a267e96,
    64'hba7c9045f12c7f99, 64'h24a19947b3916cf7, 64'h0801f2e2858efc16, 64'h636920d871574e69,
    64'ha458fea3f4933d7e, 64'h0d95748f728eb658, 64'h718bcd5882154aee, 64'h7b54a41dc25a59b5,
    64'h9c30d5392af26013, 64'hc5d1b023286085f0, 64'hca417918b8db38ef, 64'h8e79dcb0603a180e
  };

  localparam int ALPHA [7] = '{0, 1, 5, 9, 15, 21, 26};

  function automatic logic get(st_t s, int i, int j);
    return s[W-1-(6*((i % L + L) % L)+j)];
  endfunction

  function automatic logic [5:0] sbox_inv(logic [5:0] y);
    for (int v = 0; v < 64; v++) if (SBOX[v] == y) return 6'(v);
    return 6'h00;
  endfunction

  function automatic st_t sb(st_t x);
    st_t y;
    for (int i = 0; i < L; i++) y[W-1-6*i -: 6] = SBOX[x[W-1-6*i -: 6]];
    return y;
  endfunction

  function automatic st_t sb_inv(st_t x);
    st_t y;
    for (int i = 0; i < L; i++) y[W-1-6*i -: 6] = sbox_inv(x[W-1-6*i -: 6]);
    return y;
  endfunction

  function automatic st_t sc(st_t x);
    st_t y;
    for (int i = 0; i < L; i++)
      for (int j = 0; j < 6; j++) y[W-1-(6*i+j)] = get(x, i + j, j);
    return y;
  endfunction

  function automatic st_t sc_inv(st_t x);
    st_t y;
    for (int i = 0; i < L; i++)
      for (int j = 0; j < 6; j++) y[W-1-(6*((i + j) % L)+j)] = get(x, i, j);
    return y;
  endfunction

  function automatic st_t mc(st_t x);
    st_t y;
    for (int i = 0; i < L; i++)
      for (int j = 0; j < 6; j++) begin
        logic b = 1'b0;
        for (int a = 0; a < 7; a++) b ^= get(x, i + ALPHA[a], j);
        y[W-1-(6*i+j)] = b;
      end
    return y;
  endfunction

  function automatic st_t pb(st_t k);
    st_t y;
    for (int p = 0; p < W; p++) y[W-1-((7*p + 1) % W)] = k[W-1-p];
    return y;
  endfunction

  function automatic st_t rc(int q);
    return {PI_WORDS[3*q], PI_WORDS[3*q+1], PI_WORDS[3*q+2]};
  endfunction

  function automatic st_t encrypt(st_t pt, st_t key, int rounds);
    st_t s = pt, k = key;
    for (int r = 0; r < rounds - 1; r++) begin
      s = s ^ k;
      s = mc(sc(sb(sc(sb(s))))) ^ rc(r);
      k = pb(k);
    end
    s = sb(sc(sb(s ^ k)));
    k = pb(k);
    return s ^ k;
  endfunction

endpackage
