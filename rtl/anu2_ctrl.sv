// anu2_ctrl: the three-state controller of the iterative ANU-II units.
//
//   S0  load: the data and key registers take the unit's inputs.
//   S1  run: every enabled clock computes UNROLL rounds and advances the
//       round counter rc by UNROLL; rc is the number of the first of these
//       rounds. When the advanced count passes ROUNDS-1 the unit moves to S2.
//   S2  done: ready is high, rc is cleared, the result is held until reset.
// Reset (rst, synchronous, active high) returns to S0 from any state; S2 is
// left only through reset. ctr is a clock enable: while it is low no state
// or counter changes and load/run stay low. With ROUNDS = 25 and UNROLL = 2
// the unit spends 13 enabled clocks in S1 (rc = 0, 2, ..., 24).
// The three states, the S0 -> S1 -> S2 order, the test rc > 24 and the
// clearing of rc in S2 follow the cipher's state diagram; counting rc by
// UNROLL per clock, the clock-enable meaning of ctr and the synchronous
// reset are this design's choices.
// Interface: load and run are the register enables for the datapath
// (already qualified by ctr), rc the round number, ready high in S2.
module anu2_ctrl
  import anu2_pkg::*;
#(
  parameter int unsigned ROUNDS = NROUNDS,
  parameter int unsigned UNROLL = 2
) (
  input  logic clk,
  input  logic rst,
  input  logic ctr,
  output logic load,
  output logic run,
  output rc_t  rc,
  output logic ready
);

  typedef enum logic [1:0] {S0 = 2'd0, S1 = 2'd1, S2 = 2'd2} state_t;

  state_t state;
  logic [RC_W:0] rc_adv;

  always_comb begin
    rc_adv = {1'b0, rc} + (RC_W + 1)'(UNROLL);
    load   = ctr && (state == S0);
    run    = ctr && (state == S1);
    ready  = (state == S2);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S0;
      rc    <= '0;
    end else if (ctr) begin
      unique case (state)
        S0: begin
          state <= S1;
          rc    <= '0;
        end
        S1: begin
          if (rc_adv > (RC_W + 1)'(ROUNDS - 1)) begin
            state <= S2;
            rc    <= '0;
          end else begin
            rc    <= rc_adv[RC_W-1:0];
          end
        end
        S2: rc <= '0;
        default: state <= S0;
      endcase
    end
  end

  // rc counts rounds of the current block and never reaches ROUNDS in S1.
  a_rc_range: assert property (@(posedge clk) disable iff (rst)
                               state == S1 |-> rc < RC_W'(ROUNDS));
  // Outside S1 the counter is held at zero.
  a_rc_zero:  assert property (@(posedge clk) disable iff (rst)
                               state != S1 |-> rc == '0);

endmodule
