// anu2_sbox: the 4-bit ANU-II substitution box, the cipher's only
// non-linear element.
//
// A 16-entry lookup table, purely combinational (zero latency). On an FPGA
// it maps to one 4-input LUT per output bit. The table is the cipher's own:
//   x    0 1 2 3 4 5 6 7 8 9 A B C D E F
//   S(x) E 4 B 1 7 9 C A D 2 0 F 8 5 3 6
// Interface: x (4 bits) in, y = S(x) out.
module anu2_sbox
  import anu2_pkg::*;
(
  input  nibble_t x,
  output nibble_t y
);

  always_comb y = sbox_fwd(x);

endmodule
