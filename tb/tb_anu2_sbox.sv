// tb_anu2_sbox: checks all 16 entries of the S-box against the cipher's
// table and that the table is a permutation of 0..15.
module tb_anu2_sbox;
  import anu2_ref_pkg::*;
  logic [3:0] x, y;
  int checks = 0, failures = 0;
  logic [15:0] seen;

  anu2_sbox dut (.x, .y);

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int i = 0; i < 16; i++) begin
      x = 4'(i);
      #1;
      checks++;
      if (y !== S_REF[i]) begin
        failures++;
        $display("FAIL S(%h) = %h, expected %h", x, y, S_REF[i]);
      end
      seen[y] = 1'b1;
    end
    checks++;
    if (seen !== 16'hFFFF) begin
      failures++;
      $display("FAIL S-box is not a permutation: %b", seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
