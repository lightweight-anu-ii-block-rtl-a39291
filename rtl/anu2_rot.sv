// anu2_rot: fixed circular shift of a W-bit word.
//
// The cipher uses three fixed rotations: right by 3 and left by 10 on a
// 32-bit half block, and left by 13 on the 128-bit key. Because the amount
// is fixed, the rotation is only a permutation of wires and costs no logic:
// for a left rotation by n, output bit (i + n) mod W is input bit i; a right
// rotation by n is a left rotation by W - n. For the right rotation by 3,
// input bits 31..3 land on 28..0 and input bits 2..0 on 31..29.
// Parameters: W word width, AMOUNT (0 < AMOUNT < W), LEFT = 1 for a left
// rotation. The defaults give the 32-bit right rotation by 3. Combinational.
module anu2_rot #(
  parameter int unsigned W      = 32,
  parameter int unsigned AMOUNT = 3,
  parameter bit          LEFT   = 1'b0
) (
  input  logic [W-1:0] a,
  output logic [W-1:0] y
);

  localparam int unsigned L = LEFT ? (AMOUNT % W) : ((W - (AMOUNT % W)) % W);

  always_comb begin
    for (int unsigned i = 0; i < W; i++)
      y[(i + L) % W] = a[i];
  end

endmodule
