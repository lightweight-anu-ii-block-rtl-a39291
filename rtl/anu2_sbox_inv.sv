// anu2_sbox_inv: the inverse of the 4-bit ANU-II S-box, used by the
// decryption rounds and by the backward key schedule.
//
// A 16-entry combinational lookup table. Its contents are the inverse of the
// forward table, worked out at elaboration by the package function
// sbox_rev, so the two tables cannot disagree:
//   y       0 1 2 3 4 5 6 7 8 9 A B C D E F
//   S^-1(y) A 3 9 E 1 D F 4 C 5 7 2 6 8 0 B
// Interface: x (4 bits) in, y = S^-1(x) out, zero latency.
module anu2_sbox_inv
  import anu2_pkg::*;
(
  input  nibble_t x,
  output nibble_t y
);

  localparam nibble_t INV [16] = '{
    sbox_rev(4'h0), sbox_rev(4'h1), sbox_rev(4'h2), sbox_rev(4'h3),
    sbox_rev(4'h4), sbox_rev(4'h5), sbox_rev(4'h6), sbox_rev(4'h7),
    sbox_rev(4'h8), sbox_rev(4'h9), sbox_rev(4'hA), sbox_rev(4'hB),
    sbox_rev(4'hC), sbox_rev(4'hD), sbox_rev(4'hE), sbox_rev(4'hF)
  };

  always_comb y = INV[x];

endmodule
