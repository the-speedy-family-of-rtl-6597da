// speedy_pkg: constants and index helpers shared by the SPEEDY-r-6l cipher modules.
//
// The SPEEDY state is an l x 6 array of bits (l rows of 6 bits, one S-box per row).
// Bit [i,j] (row i, column j) is stored at vector position W-1-(6*i+j) of a packed
// logic [W-1:0], so bit [0,0] is the MSB, matching the cipher's convention that
// index zero is always the most significant bit or word.
//
// Contents:
//  * the default instance SPEEDY-r-192 (l = 32 rows, 192-bit block and key),
//  * the MixColumns offsets alpha = (1,5,9,15,21,26) and the inverse offsets (w = 19),
//  * the key-schedule parameters beta = 7, gamma = 1,
//  * the round-constant source: the fractional binary digits of pi, 36 x 64 bits,
//    enough for c_0..c_11 (ciphers of up to 13 rounds); c_r is the r-th 6l-bit slice.
// All of these values are the cipher specification's; the 36-word length of the
// constant store is this implementation's choice.
package speedy_pkg;

  localparam int unsigned SBOX_BITS    = 6;
  localparam int unsigned DEFAULT_ROWS = 32;
  localparam int unsigned DEFAULT_ROUNDS = 6;

  // MixColumns offsets of the cyclic matrix 1 + z^a1 + ... + z^a6 (l = 32)
  localparam int unsigned MC_TAPS = 6;
  typedef int unsigned mc_alpha_t [MC_TAPS];
  localparam mc_alpha_t DEFAULT_ALPHA = '{1, 5, 9, 15, 21, 26};

  // Offsets of the inverse cyclic matrix (w = 19, offset 0 included implicitly)
  localparam int unsigned MC_INV_TAPS = 18;
  typedef int unsigned mc_alpha_inv_t [MC_INV_TAPS];
  localparam mc_alpha_inv_t DEFAULT_ALPHA_INV =
    '{4, 5, 6, 7, 10, 12, 14, 15, 16, 18, 19, 20, 21, 22, 23, 24, 25, 28};

  // Key schedule bit permutation: position p -> (BETA*p + GAMMA) mod 6l
  localparam int unsigned DEFAULT_BETA  = 7;
  localparam int unsigned DEFAULT_GAMMA = 1;

  // Binary digits of pi - 3, first digit first (index 0 = MSB of c_0)
  localparam int unsigned PI_WORDS = 36;
  localparam int unsigned PI_BITS  = PI_WORDS * 64;
  localparam logic [0:PI_BITS-1] PI_FRAC = {
    64'h243f6a8885a308d3, 64'h13198a2e03707344, 64'ha4093822299f31d0, 64'h082efa98ec4e6c89,
    64'h452821e638d01377, 64'hbe5466cf34e90c6c, 64'hc0ac29b7c97c50dd, 64'h3f84d5b5b5470917,
    64'h9216d5d98979fb1b, 64'hd1310ba698dfb5ac, 64'h2ffd72dbd01adfb7, 64'hb8e1afed6a267e96,
    64'hba7c9045f12c7f99, 64'h24a19947b3916cf7, 64'h0801f2e2858efc16, 64'h636920d871574e69,
    64'ha458fea3f4933d7e, 64'h0d95748f728eb658, 64'h718bcd5882154aee, 64'h7b54a41dc25a59b5,
    64'h9c30d5392af26013, 64'hc5d1b023286085f0, 64'hca417918b8db38ef, 64'h8e79dcb0603a180e,
    64'h6c9e0e8bb01e8a3e, 64'hd71577c1bd314b27, 64'h78af2fda55605c60, 64'he65525f3aa55ab94,
    64'h5748986263e81440, 64'h55ca396a2aab10b6, 64'hb4cc5c341141e8ce, 64'ha15486af7c72e993,
    64'hb3ee1411636fbc2a, 64'h2ba9c55d741831f6, 64'hce5c3e169b87931e, 64'hafd6ba336c24cf5c
  };

  // Largest round count whose constants c_0..c_(r-2) fit in PI_FRAC for a given l
  function automatic int unsigned max_rounds(int unsigned rows);
    return PI_BITS / (SBOX_BITS * rows) + 1;
  endfunction

  // Vector position of state bit [i,j] in a packed logic [6*rows-1:0]
  function automatic int unsigned pos(int unsigned rows, int unsigned i, int unsigned j);
    return SBOX_BITS * rows - 1 - (SBOX_BITS * i + j);
  endfunction

endpackage
