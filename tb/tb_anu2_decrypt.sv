// tb_anu2_decrypt: decrypts reference ciphertexts with the reference final
// key and expects the original plaintext after 13 enabled clocks (25 for a
// one-round-per-clock instance), with and without a ctr stall.
module tb_anu2_decrypt;
  import anu2_ref_pkg::*;
  logic clk = 1'b0, rst, ctr;
  logic [127:0] key;
  logic [31:0] c_msb, c_lsb, p_msb2, p_lsb2, p_msb1, p_lsb1;
  logic ready2, ready1;
  int checks = 0, failures = 0;

  anu2_decrypt dut2 (.clk, .rst, .ctr, .KEY(key), .C_MSBi(c_msb), .C_LSBi(c_lsb),
                     .P_MSBi(p_msb2), .P_LSBi(p_lsb2), .ANU_Ready(ready2));
  anu2_decrypt #(.ROUNDS(25), .UNROLL(1)) dut1 (
                     .clk, .rst, .ctr, .KEY(key), .C_MSBi(c_msb), .C_LSBi(c_lsb),
                     .P_MSBi(p_msb1), .P_LSBi(p_lsb1), .ANU_Ready(ready1));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic one_block(logic [63:0] pt, logic [127:0] k, bit stall);
    logic [127:0] k_last;
    logic [63:0]  ct;
    int clocks = 0, stalled = 0;
    bit done2 = 0, done1 = 0;
    ct = ref_encrypt(pt, k, k_last);
    {c_msb, c_lsb} = ct;
    key = k_last;
    rst = 1'b1; ctr = 1'b1;
    @(posedge clk);
    #1 rst = 1'b0;
    @(posedge clk); #1;
    {c_msb, c_lsb} = ~ct;
    key = ~k_last;
    while (!(done2 && done1) && clocks < 60) begin
      if (stall && clocks == 7 && stalled < 2) begin
        ctr = 1'b0; stalled++;
      end else begin
        ctr = 1'b1;
        clocks++;
      end
      @(posedge clk); #1;
      if (ready2 && !done2) begin
        done2 = 1;
        check(clocks == 13, $sformatf("unroll 2 latency %0d clocks, expected 13", clocks));
      end
      if (ready1 && !done1) begin
        done1 = 1;
        check(clocks == 25, $sformatf("unroll 1 latency %0d clocks, expected 25", clocks));
      end
    end
    check({p_msb2, p_lsb2} == pt,
          $sformatf("plaintext %h expected %h (ct %h)", {p_msb2, p_lsb2}, pt, ct));
    check({p_msb1, p_lsb1} == pt, "plaintext of the one-round-per-clock unit");
  endtask

  initial begin
    one_block(64'h0, 128'h0, 1'b0);
    for (int i = 0; i < 20; i++) one_block(rand64(), rand128(), i[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
