// anu2_encrypt: iterative ANU-II encryption unit, 64-bit block, 128-bit key.
//
// Datapath: two load multiplexers feed two 32-bit half registers (MSB and
// LSB) and a third feeds the 128-bit key register. In S0 of the controller
// they take the plaintext and key; in S1 they take the output of a chain of
// UNROLL rounds, each with its own key-schedule step, so UNROLL rounds are
// done per clock. Slot k of the chain computes round rc + k. The cipher has
// 25 rounds, so with UNROLL = 2 the second slot of the 13th clock would be
// round 25: that slot is bypassed (state and key pass unchanged) and
// exactly 25 rounds are applied.
//
// Timing with the defaults: after rst falls, one enabled clock in S0 loads
// the block, 13 enabled clocks in S1 run the rounds, and on the next edge
// ANU_Ready rises with the ciphertext on C_MSBi/C_LSBi. The result is held
// until rst. Lowering ctr freezes the unit at any point.
//
// Follows the cipher's hardware description: the register/multiplexer
// structure, the round and key-schedule dataflow, two rounds per clock and
// 13 clocks per block. This design's own choices: the bypass of the unused
// last slot, synchronous reset, ctr as a clock enable, the ANU_Ready output
// and the key_last output, which carries the key after all 25 updates (the
// key the decryption unit starts from) once ANU_Ready is high.
module anu2_encrypt
  import anu2_pkg::*;
#(
  parameter int unsigned ROUNDS = NROUNDS,
  parameter int unsigned UNROLL = 2
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  ctr,
  input  key_t  KEY,
  input  half_t P_MSBi,
  input  half_t P_LSBi,
  output half_t C_MSBi,
  output half_t C_LSBi,
  output logic  ANU_Ready,
  output key_t  key_last
);

  logic  load, run;
  rc_t   rc;
  half_t msb_q, lsb_q;
  key_t  key_q;

  // Chain of UNROLL round slots; index 0 is the registered state.
  half_t msb_c [UNROLL+1];
  half_t lsb_c [UNROLL+1];
  key_t  key_c [UNROLL+1];

  anu2_ctrl #(.ROUNDS(ROUNDS), .UNROLL(UNROLL)) u_ctrl (
    .clk, .rst, .ctr, .load, .run, .rc, .ready(ANU_Ready)
  );

  assign msb_c[0] = msb_q;
  assign lsb_c[0] = lsb_q;
  assign key_c[0] = key_q;

  for (genvar k = 0; k < UNROLL; k++) begin : g_slot
    half_t rk1, rk2, msb_r, lsb_r;
    key_t  key_n;
    rc_t   rc_k;
    logic  active;

    always_comb begin
      rc_k   = rc + RC_W'(k);
      active = (int'(rc) + k) < int'(ROUNDS);
    end

    anu2_key_step u_key (
      .key_i(key_c[k]), .rc(rc_k), .key_o(key_n), .rk1, .rk2
    );
    anu2_round u_round (
      .msb_i(msb_c[k]), .lsb_i(lsb_c[k]), .rk1, .rk2,
      .msb_o(msb_r), .lsb_o(lsb_r)
    );

    assign msb_c[k+1] = active ? msb_r : msb_c[k];
    assign lsb_c[k+1] = active ? lsb_r : lsb_c[k];
    assign key_c[k+1] = active ? key_n : key_c[k];
  end

  always_ff @(posedge clk) begin
    if (load) begin
      msb_q <= P_MSBi;
      lsb_q <= P_LSBi;
      key_q <= KEY;
    end else if (run) begin
      msb_q <= msb_c[UNROLL];
      lsb_q <= lsb_c[UNROLL];
      key_q <= key_c[UNROLL];
    end
  end

  always_comb begin
    C_MSBi   = msb_q;
    C_LSBi   = lsb_q;
    key_last = key_q;
  end

endmodule
