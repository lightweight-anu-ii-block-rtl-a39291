// anu2_key_step: one step of the ANU-II 128-bit key schedule,
// purely combinational.
//
// The round subkeys are read straight from the key register: rk1 is key
// bits 31..0 and rk2 is key bits 63..32. The register's next value is made
// in three steps, in the cipher's order:
//   1. rotate the 128-bit key left by 13,
//   2. pass bits 7..4 and 3..0 each through the 4-bit S-box,
//   3. XOR bits 63..59 with the 5-bit round counter rc (0..24).
// Interface: key_i the key register, rc the round number, key_o the updated
// key, rk1/rk2 the subkeys of key_i. Zero latency.
module anu2_key_step
  import anu2_pkg::*;
(
  input  key_t  key_i,
  input  rc_t   rc,
  output key_t  key_o,
  output half_t rk1,
  output half_t rk2
);

  key_t    rotated;
  nibble_t s_hi, s_lo;

  anu2_rot #(.W(KEY_W), .AMOUNT(13), .LEFT(1'b1)) u_rol13 (.a(key_i), .y(rotated));
  anu2_sbox u_sbox_hi (.x(rotated[7:4]), .y(s_hi));
  anu2_sbox u_sbox_lo (.x(rotated[3:0]), .y(s_lo));

  always_comb begin
    rk1            = key_i[31:0];
    rk2            = key_i[63:32];
    key_o          = rotated;
    key_o[7:0]     = {s_hi, s_lo};
    key_o[63:59]   = rotated[63:59] ^ rc;
  end

endmodule
