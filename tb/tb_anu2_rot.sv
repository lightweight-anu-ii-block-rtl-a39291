// tb_anu2_rot: checks the three rotations the cipher uses (32-bit right by
// 3, the default; 32-bit left by 10; 128-bit left by 13) on walking-one and
// random words against shift/OR expressions.
module tb_anu2_rot;
  import anu2_ref_pkg::*;
  logic [31:0]  a32, y_r3, y_l10;
  logic [127:0] a128, y_l13;
  int checks = 0, failures = 0;

  anu2_rot dut_r3 (.a(a32), .y(y_r3));
  anu2_rot #(.W(32), .AMOUNT(10), .LEFT(1'b1)) dut_l10 (.a(a32), .y(y_l10));
  anu2_rot #(.W(128), .AMOUNT(13), .LEFT(1'b1)) dut_l13 (.a(a128), .y(y_l13));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [127:0] got, logic [127:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    // Bit 0..2 of the input must land on 29..31 after >>> 3.
    a32 = 32'h0000_0001; a128 = '0; #1;
    check(128'(y_r3), 128'h2000_0000, "ror3 bit0");
    a32 = 32'h0000_0004; #1;
    check(128'(y_r3), 128'h8000_0000, "ror3 bit2");
    a32 = 32'h8000_0000; #1;
    check(128'(y_l10), 128'h0000_0200, "rol10 bit31");
    for (int i = 0; i < 200; i++) begin
      a32  = $urandom;
      a128 = rand128();
      #1;
      check(128'(y_r3),  128'(ref_ror3(a32)),  "ror3");
      check(128'(y_l10), 128'(ref_rol10(a32)), "rol10");
      check(y_l13, ref_rol13(a128), "rol13");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
