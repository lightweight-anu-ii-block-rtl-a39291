// tb_anu2_round_inv: the decryption round must undo the reference
// encryption round for random states and subkeys.
module tb_anu2_round_inv;
  import anu2_ref_pkg::*;
  logic [31:0] msb_i, lsb_i, rk1, rk2, msb_o, lsb_o;
  logic [63:0] pt, ct;
  int checks = 0, failures = 0;

  anu2_round_inv dut (.*);

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 300; i++) begin
      pt  = rand64();
      rk1 = $urandom; rk2 = $urandom;
      ct  = ref_round(pt, {64'h0, rk2, rk1});
      {msb_i, lsb_i} = ct;
      #1;
      checks++;
      if ({msb_o, lsb_o} !== pt) begin
        failures++;
        $display("FAIL inverse round of %h gave %h expected %h", ct, {msb_o, lsb_o}, pt);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
