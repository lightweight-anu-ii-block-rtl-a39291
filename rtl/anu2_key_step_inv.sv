// anu2_key_step_inv: one step of the ANU-II key schedule run backwards,
// purely combinational.
//
// Decryption needs the round subkeys in reverse order. Instead of storing
// all 25, the decryption unit starts from the key left after the last
// encryption update and undoes one update per round, the three operations
// of anu2_key_step in reverse order:
//   1. XOR bits 63..59 with the round counter rc,
//   2. pass bits 7..4 and 3..0 each through the inverse S-box,
//   3. rotate the 128-bit key right by 13.
// The subkeys rk1 = key_o[31:0], rk2 = key_o[63:32] are those of the
// recovered key, i.e. the ones encryption round rc used.
// Interface: key_i the key after update rc, key_o the key before it.
// Zero latency. The cipher specification only says that the subkeys are
// needed in reverse order; undoing the update step is this design's way.
module anu2_key_step_inv
  import anu2_pkg::*;
(
  input  key_t  key_i,
  input  rc_t   rc,
  output key_t  key_o,
  output half_t rk1,
  output half_t rk2
);

  key_t    unmixed;
  nibble_t s_hi, s_lo;

  anu2_sbox_inv u_sbox_hi (.x(key_i[7:4]), .y(s_hi));
  anu2_sbox_inv u_sbox_lo (.x(key_i[3:0]), .y(s_lo));
  anu2_rot #(.W(KEY_W), .AMOUNT(13), .LEFT(1'b0)) u_ror13 (.a(unmixed), .y(key_o));

  always_comb begin
    unmixed        = key_i;
    unmixed[63:59] = key_i[63:59] ^ rc;
    unmixed[7:0]   = {s_hi, s_lo};
    rk1            = key_o[31:0];
    rk2            = key_o[63:32];
  end

endmodule
