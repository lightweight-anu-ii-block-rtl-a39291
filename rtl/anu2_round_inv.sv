// anu2_round_inv: one ANU-II decryption round, the exact inverse of
// anu2_round, purely combinational.
//
// An encryption round maps (L, R) to (t2, t1). Given that output as
// (msb_i, lsb_i) = (t2, t1), the round is undone by
//   R = msb_i ^ (lsb_i <<< 10) ^ rk2
//   L = S^-1(lsb_i ^ (R >>> 3) ^ rk1)
// and the result (L, R) leaves on (msb_o, lsb_o). This is the decryption
// dataflow of the cipher: the same XORs and rotations as encryption with
// the roles of the halves exchanged, and the inverse S-box layer after the
// second XOR instead of before the first. The subkeys must be those the
// matching encryption round used.
// Interface: msb_i/lsb_i the state in, rk1/rk2 the subkeys, msb_o/lsb_o the
// state out. Zero latency.
module anu2_round_inv
  import anu2_pkg::*;
(
  input  half_t msb_i,
  input  half_t lsb_i,
  input  half_t rk1,
  input  half_t rk2,
  output half_t msb_o,
  output half_t lsb_o
);

  half_t l_rol10, r_rec, r_ror3, pre_sbox, l_rec;

  anu2_rot #(.W(HALF_W), .AMOUNT(10), .LEFT(1'b1)) u_rol10 (.a(lsb_i), .y(l_rol10));
  anu2_rot #(.W(HALF_W), .AMOUNT(3),  .LEFT(1'b0)) u_ror3  (.a(r_rec), .y(r_ror3));

  for (genvar k = 0; k < HALF_W / 4; k++) begin : g_sbox_inv
    anu2_sbox_inv u_sbox_inv (.x(pre_sbox[4*k +: 4]), .y(l_rec[4*k +: 4]));
  end

  always_comb begin
    r_rec    = msb_i ^ l_rol10 ^ rk2;
    pre_sbox = lsb_i ^ r_ror3 ^ rk1;
    msb_o    = l_rec;
    lsb_o    = r_rec;
  end

endmodule
