// tb_anu2_sbox_inv: checks S^-1(S(x)) = x for all 16 nibbles, using the
// testbench's own copy of the forward table, plus four spot values.
module tb_anu2_sbox_inv;
  import anu2_ref_pkg::*;
  logic [3:0] x, y;
  int checks = 0, failures = 0;

  anu2_sbox_inv dut (.x, .y);

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(logic [3:0] in, logic [3:0] exp);
    x = in;
    #1;
    checks++;
    if (y !== exp) begin
      failures++;
      $display("FAIL S^-1(%h) = %h, expected %h", in, y, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < 16; i++) expect_eq(S_REF[i], 4'(i));
    expect_eq(4'h0, 4'hA);
    expect_eq(4'hE, 4'h0);
    expect_eq(4'hF, 4'hB);
    expect_eq(4'h6, 4'hF);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
