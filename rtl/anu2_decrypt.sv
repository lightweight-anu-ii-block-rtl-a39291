// anu2_decrypt: iterative ANU-II decryption unit, 64-bit block, 128-bit key.
//
// Same structure as the encryption unit: load multiplexers, two 32-bit half
// registers, a 128-bit key register, the three-state controller and a chain
// of UNROLL round slots per clock, 13 clocks for 25 rounds with UNROLL = 2.
// Each slot undoes one encryption round. Decryption needs the subkeys last
// round first, so the key register is loaded with the key the encryption
// unit holds after its 25th key update, and each slot first undoes one key
// update (anu2_key_step_inv) and then applies the inverse round
// (anu2_round_inv) with the subkeys of the recovered key. Slot k of the
// clock with counter rc undoes encryption round ROUNDS-1-(rc+k); the slot
// that would be round 25 is bypassed as in the encryption unit.
//
// Timing: one enabled clock in S0 loads ciphertext and key, 13 enabled
// clocks in S1, then ANU_Ready rises with the plaintext on P_MSBi/P_LSBi,
// held until rst. ctr is a clock enable, rst a synchronous reset.
// Follows the cipher's decryption dataflow and its 13-clock latency; the
// backward key schedule and the bypass are this design's own.
module anu2_decrypt
  import anu2_pkg::*;
#(
  parameter int unsigned ROUNDS = NROUNDS,
  parameter int unsigned UNROLL = 2
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  ctr,
  input  key_t  KEY,
  input  half_t C_MSBi,
  input  half_t C_LSBi,
  output half_t P_MSBi,
  output half_t P_LSBi,
  output logic  ANU_Ready
);

  logic  load, run;
  rc_t   rc;
  half_t msb_q, lsb_q;
  key_t  key_q;

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
    key_t  key_p;
    rc_t   round_k;
    logic  active;

    always_comb begin
      active  = (int'(rc) + k) < int'(ROUNDS);
      round_k = RC_W'(int'(ROUNDS) - 1 - int'(rc) - k);
    end

    anu2_key_step_inv u_key (
      .key_i(key_c[k]), .rc(round_k), .key_o(key_p), .rk1, .rk2
    );
    anu2_round_inv u_round (
      .msb_i(msb_c[k]), .lsb_i(lsb_c[k]), .rk1, .rk2,
      .msb_o(msb_r), .lsb_o(lsb_r)
    );

    assign msb_c[k+1] = active ? msb_r : msb_c[k];
    assign lsb_c[k+1] = active ? lsb_r : lsb_c[k];
    assign key_c[k+1] = active ? key_p : key_c[k];
  end

  always_ff @(posedge clk) begin
    if (load) begin
      msb_q <= C_MSBi;
      lsb_q <= C_LSBi;
      key_q <= KEY;
    end else if (run) begin
      msb_q <= msb_c[UNROLL];
      lsb_q <= lsb_c[UNROLL];
      key_q <= key_c[UNROLL];
    end
  end

  always_comb begin
    P_MSBi = msb_q;
    P_LSBi = lsb_q;
  end

endmodule
