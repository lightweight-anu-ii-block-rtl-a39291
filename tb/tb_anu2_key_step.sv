// tb_anu2_key_step: one key-schedule step on random keys and every round
// counter 0..24 against the reference model; the subkeys must be key bits
// 31..0 and 63..32.
module tb_anu2_key_step;
  import anu2_ref_pkg::*;
  logic [127:0] key_i, key_o;
  logic [4:0]   rc;
  logic [31:0]  rk1, rk2;
  int checks = 0, failures = 0;

  anu2_key_step dut (.*);

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 250; i++) begin
      key_i = rand128();
      rc    = 5'(i % 25);
      #1;
      checks++;
      if (key_o !== ref_key_update(key_i, int'(rc))) begin
        failures++;
        $display("FAIL update(%h, %0d) = %h expected %h", key_i, rc, key_o,
                 ref_key_update(key_i, int'(rc)));
      end
      checks++;
      if (rk1 !== key_i[31:0] || rk2 !== key_i[63:32]) begin
        failures++;
        $display("FAIL subkeys %h %h of key %h", rk1, rk2, key_i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
