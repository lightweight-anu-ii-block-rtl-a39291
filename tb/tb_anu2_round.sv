// tb_anu2_round: one encryption round on random states and subkeys against
// the reference model, plus the all-zero input, whose result follows from
// S(0) = E by hand: t1 = EEEEEEEE, t2 = t1 <<< 10 = BBBBBBBB... rotated.
module tb_anu2_round;
  import anu2_ref_pkg::*;
  logic [31:0] msb_i, lsb_i, rk1, rk2, msb_o, lsb_o;
  int checks = 0, failures = 0;

  anu2_round dut (.*);

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [63:0] exp);
    checks++;
    if ({msb_o, lsb_o} !== exp) begin
      failures++;
      $display("FAIL round(%h,%h,%h,%h) = %h expected %h",
               msb_i, lsb_i, rk1, rk2, {msb_o, lsb_o}, exp);
    end
  endtask

  initial begin
    msb_i = '0; lsb_i = '0; rk1 = '0; rk2 = '0; #1;
    // t1 = EEEEEEEE; t1 <<< 10 = BBBBBBBB (E = 1110, a 10-bit shift of a
    // repeating 1110 pattern starts at ...1011).
    check({32'hBBBB_BBBB, 32'hEEEE_EEEE});
    for (int i = 0; i < 300; i++) begin
      msb_i = $urandom; lsb_i = $urandom; rk1 = $urandom; rk2 = $urandom;
      #1;
      check(ref_round({msb_i, lsb_i}, {64'h0, rk2, rk1}));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
