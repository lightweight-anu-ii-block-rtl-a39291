// tb_anu2_key_step_inv: the backward key step must return the key before a
// reference key update, for random keys and every round counter, and give
// that key's subkeys.
module tb_anu2_key_step_inv;
  import anu2_ref_pkg::*;
  logic [127:0] key_i, key_o, k0;
  logic [4:0]   rc;
  logic [31:0]  rk1, rk2;
  int checks = 0, failures = 0;

  anu2_key_step_inv dut (.*);

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 250; i++) begin
      k0    = rand128();
      rc    = 5'(i % 25);
      key_i = ref_key_update(k0, int'(rc));
      #1;
      checks++;
      if (key_o !== k0) begin
        failures++;
        $display("FAIL inverse update(%h, %0d) = %h expected %h", key_i, rc, key_o, k0);
      end
      checks++;
      if (rk1 !== k0[31:0] || rk2 !== k0[63:32]) begin
        failures++;
        $display("FAIL subkeys %h %h expected %h %h", rk1, rk2, k0[31:0], k0[63:32]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
