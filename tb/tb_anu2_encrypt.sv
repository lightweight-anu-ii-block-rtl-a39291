// tb_anu2_encrypt: encrypts random blocks under random keys and compares the
// ciphertext and the final key register with the reference model. Checks
// the latency (13 enabled clocks in S1 at the default two rounds per clock,
// 25 for a one-round-per-clock instance), a stall with ctr low in mid
// encryption, and that the result is held in S2.
module tb_anu2_encrypt;
  import anu2_ref_pkg::*;
  logic clk = 1'b0, rst, ctr;
  logic [127:0] key, key_last2, key_last1;
  logic [31:0] p_msb, p_lsb, c_msb2, c_lsb2, c_msb1, c_lsb1;
  logic ready2, ready1;
  int checks = 0, failures = 0;

  anu2_encrypt dut2 (.clk, .rst, .ctr, .KEY(key), .P_MSBi(p_msb), .P_LSBi(p_lsb),
                     .C_MSBi(c_msb2), .C_LSBi(c_lsb2), .ANU_Ready(ready2),
                     .key_last(key_last2));
  anu2_encrypt #(.ROUNDS(25), .UNROLL(1)) dut1 (
                     .clk, .rst, .ctr, .KEY(key), .P_MSBi(p_msb), .P_LSBi(p_lsb),
                     .C_MSBi(c_msb1), .C_LSBi(c_lsb1), .ANU_Ready(ready1),
                     .key_last(key_last1));

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
    logic [127:0] k_exp;
    logic [63:0]  ct_exp;
    int clocks = 0, stalled = 0;
    bit done2 = 0, done1 = 0;
    ct_exp = ref_encrypt(pt, k, k_exp);
    {p_msb, p_lsb} = pt;
    key = k;
    rst = 1'b1; ctr = 1'b1;
    @(posedge clk);
    #1 rst = 1'b0;
    @(posedge clk); #1;               // S0 load edge
    {p_msb, p_lsb} = ~pt;             // inputs are only read in S0
    key = ~k;
    while (!(done2 && done1) && clocks < 60) begin
      if (stall && clocks == 5 && stalled < 3) begin
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
    check({c_msb2, c_lsb2} == ct_exp,
          $sformatf("ciphertext %h expected %h (pt %h key %h)", {c_msb2, c_lsb2}, ct_exp, pt, k));
    check(key_last2 == k_exp, "final key register");
    check({c_msb1, c_lsb1} == ct_exp, "ciphertext of the one-round-per-clock unit");
    check(key_last1 == k_exp, "final key register of the one-round-per-clock unit");
    repeat (3) @(posedge clk);
    #1;
    check(ready2 && {c_msb2, c_lsb2} == ct_exp, "result held in S2");
  endtask

  initial begin
    one_block(64'h0, 128'h0, 1'b0);
    one_block(64'hFFFF_FFFF_FFFF_FFFF, {4{32'hFFFF_FFFF}}, 1'b1);
    for (int i = 0; i < 20; i++) one_block(rand64(), rand128(), i[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
