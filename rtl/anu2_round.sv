// anu2_round: one ANU-II encryption round, purely combinational.
//
// The 64-bit state is two 32-bit halves. With L the most significant half
// and R the least significant half, one round computes
//   t1 = S(L) ^ (R >>> 3) ^ rk1       (S applied to each of the 8 nibbles)
//   t2 = (t1 <<< 10) ^ R ^ rk2
// and swaps the two results: the new L is t2, the new R is t1.
// The dataflow (S-box layer, the two XORs, the two rotations and the swap)
// follows the cipher's round diagram. Nibble k of L goes through S-box k
// and stays in place; that placement is this design's reading.
// Interface: msb_i/lsb_i the state in, rk1/rk2 the round's two 32-bit
// subkeys, msb_o/lsb_o the state out. Zero latency.
module anu2_round
  import anu2_pkg::*;
(
  input  half_t msb_i,
  input  half_t lsb_i,
  input  half_t rk1,
  input  half_t rk2,
  output half_t msb_o,
  output half_t lsb_o
);

  half_t sub, r_ror3, t1, t1_rol10, t2;

  for (genvar k = 0; k < HALF_W / 4; k++) begin : g_sbox
    anu2_sbox u_sbox (.x(msb_i[4*k +: 4]), .y(sub[4*k +: 4]));
  end

  anu2_rot #(.W(HALF_W), .AMOUNT(3),  .LEFT(1'b0)) u_ror3  (.a(lsb_i), .y(r_ror3));
  anu2_rot #(.W(HALF_W), .AMOUNT(10), .LEFT(1'b1)) u_rol10 (.a(t1),    .y(t1_rol10));

  always_comb begin
    t1    = sub ^ r_ror3 ^ rk1;
    t2    = t1_rol10 ^ lsb_i ^ rk2;
    msb_o = t2;
    lsb_o = t1;
  end

endmodule
