// tb_anu2_top: end-to-end test of the ANU-II top at its default parameters
// (25 rounds, two rounds per clock). For each random block: encrypt, check
// the ciphertext and key against the reference model and the 13-clock
// latency, then hand the ciphertext and the encryption unit's final key to
// the decryption unit and check that the plaintext comes back in 13 clocks.
// Some blocks drop ctr mid-operation. It counts each mechanism of the design
// and fails if one never occurred: the S0 load, a two-round clock, the
// bypassed 26th round slot, a ctr stall in S1, the S2 hold, a reset out of
// S2, and a decryption.
module tb_anu2_top;
  import anu2_ref_pkg::*;
  logic clk = 1'b0, rst;
  logic enc_ctr, dec_ctr, enc_ready, dec_ready;
  logic [127:0] enc_key, enc_key_last, dec_key;
  logic [31:0] enc_p_msb, enc_p_lsb, enc_c_msb, enc_c_lsb;
  logic [31:0] dec_c_msb, dec_c_lsb, dec_p_msb, dec_p_lsb;
  int checks = 0, failures = 0;
  int n_load = 0, n_two_round = 0, n_bypass = 0, n_stall = 0, n_hold = 0,
      n_reset_s2 = 0, n_decrypt = 0;

  anu2_top dut (.*);

  always #5 clk = ~clk;

  // Mechanism counters, sampled at each rising edge from the encryption unit.
  always @(posedge clk) begin
    if (!rst) begin
      if (dut.u_enc.load) n_load++;
      if (dut.u_enc.run && dut.u_enc.g_slot[0].active && dut.u_enc.g_slot[1].active)
        n_two_round++;
      if (dut.u_enc.run && !dut.u_enc.g_slot[1].active) n_bypass++;
      if (!enc_ctr && !enc_ready && !dut.u_enc.load) n_stall++;
      if (enc_ready && enc_ctr) n_hold++;
    end else if (enc_ready) begin
      n_reset_s2++;
    end
  end

  initial begin
    #2000000;
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

  // Run one unit (enc = 1 for encryption) from reset to ready; returns the
  // number of enabled clocks after the load clock.
  task automatic run_unit(bit enc, bit stall, output int clocks);
    int stalled = 0;
    clocks = 0;
    rst = 1'b1;
    @(posedge clk);
    #1 rst = 1'b0;
    @(posedge clk); #1;                       // load clock
    while (!(enc ? enc_ready : dec_ready) && clocks < 60) begin
      if (stall && clocks == 4 && stalled < 3) begin
        if (enc) enc_ctr = 1'b0; else dec_ctr = 1'b0;
        stalled++;
      end else begin
        enc_ctr = 1'b1; dec_ctr = 1'b1;
        clocks++;
      end
      @(posedge clk); #1;
    end
    enc_ctr = 1'b1; dec_ctr = 1'b1;
  endtask

  task automatic one_block(logic [63:0] pt, logic [127:0] k, bit stall);
    logic [127:0] k_exp;
    logic [63:0]  ct_exp, ct;
    int clocks;
    ct_exp = ref_encrypt(pt, k, k_exp);
    {enc_p_msb, enc_p_lsb} = pt;
    enc_key = k;
    run_unit(1'b1, stall, clocks);
    check(clocks == 13, $sformatf("encryption took %0d clocks, expected 13", clocks));
    check({enc_c_msb, enc_c_lsb} == ct_exp,
          $sformatf("ciphertext %h expected %h", {enc_c_msb, enc_c_lsb}, ct_exp));
    check(enc_key_last == k_exp, "final encryption key");
    repeat (2) @(posedge clk);
    #1;
    check(enc_ready && {enc_c_msb, enc_c_lsb} == ct_exp, "ciphertext held");
    // Decrypt with the encryption unit's own outputs.
    ct = {enc_c_msb, enc_c_lsb};
    {dec_c_msb, dec_c_lsb} = ct;
    dec_key = enc_key_last;
    run_unit(1'b0, stall, clocks);
    n_decrypt++;
    check(clocks == 13, $sformatf("decryption took %0d clocks, expected 13", clocks));
    check({dec_p_msb, dec_p_lsb} == pt,
          $sformatf("decrypted %h expected %h", {dec_p_msb, dec_p_lsb}, pt));
  endtask

  initial begin
    rst = 1'b1; enc_ctr = 1'b1; dec_ctr = 1'b1;
    enc_key = '0; dec_key = '0;
    {enc_p_msb, enc_p_lsb, dec_c_msb, dec_c_lsb} = '0;
    repeat (2) @(posedge clk);
    one_block(64'h0123_4567_89AB_CDEF, 128'h0011_2233_4455_6677_8899_AABB_CCDD_EEFF, 1'b0);
    for (int i = 0; i < 30; i++) one_block(rand64(), rand128(), i[0]);
    check(n_load > 0,      "mechanism: load in S0 never happened");
    check(n_two_round > 0, "mechanism: two rounds in one clock never happened");
    check(n_bypass > 0,    "mechanism: bypass of the round-25 slot never happened");
    check(n_stall > 0,     "mechanism: ctr stall never happened");
    check(n_hold > 0,      "mechanism: S2 hold never happened");
    check(n_reset_s2 > 0,  "mechanism: reset out of S2 never happened");
    check(n_decrypt > 0,   "mechanism: decryption never happened");
    $display("mechanisms: load=%0d two_round=%0d bypass=%0d stall=%0d hold=%0d reset_s2=%0d decrypt=%0d",
             n_load, n_two_round, n_bypass, n_stall, n_hold, n_reset_s2, n_decrypt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
