// anu2_pkg: constants and tables shared by the ANU-II cipher modules.
//
// ANU-II is a 64-bit Feistel block cipher with a 128-bit key and 25 rounds.
// The package holds the half-block and key widths, the round count,
// the 4-bit S-box of the cipher and its inverse. The inverse table is not
// stored separately: it is computed at elaboration time by inverting the
// forward table, so only one table of sixteen nibbles is written down.
// The widths and the table follow the cipher's specification; the names
// and the round-counter width of 5 bits (rounds 0..24) are this design's.
package anu2_pkg;

  localparam int unsigned HALF_W  = 32;
  localparam int unsigned KEY_W   = 128;
  localparam int unsigned RC_W    = 5;
  localparam int unsigned NROUNDS = 25;

  typedef logic [HALF_W-1:0] half_t;
  typedef logic [KEY_W-1:0]  key_t;
  typedef logic [RC_W-1:0]   rc_t;
  typedef logic [3:0]        nibble_t;

  // S(x) for x = 0..15, entry x at index x.
  localparam nibble_t SBOX [16] = '{
    4'hE, 4'h4, 4'hB, 4'h1, 4'h7, 4'h9, 4'hC, 4'hA,
    4'hD, 4'h2, 4'h0, 4'hF, 4'h8, 4'h5, 4'h3, 4'h6
  };

  function automatic nibble_t sbox_fwd(nibble_t x);
    return SBOX[x];
  endfunction

  // S^-1(y) = the x with S(x) = y.
  function automatic nibble_t sbox_rev(nibble_t y);
    nibble_t r = '0;
    for (int i = 0; i < 16; i++)
      if (SBOX[i] == y) r = nibble_t'(i);
    return r;
  endfunction

endpackage
