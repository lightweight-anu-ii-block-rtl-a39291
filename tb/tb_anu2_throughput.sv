// tb_anu2_throughput: streams a run of blocks through the encryption unit
// back to back, the way a host would use it (pulse rst, wait for ANU_Ready,
// read, repeat), checks every ciphertext, and measures the clocks per block.
// It checks the 13-clock round latency and the 15-clock block period of the
// reset-to-reset protocol, and prints the throughput these give at the clock
// frequencies the cipher core was reported to reach on four FPGA families
// (305.157, 396.471, 547.72 and 778.21 MHz): 64 bits x f / clocks.
module tb_anu2_throughput;
  import anu2_ref_pkg::*;
  localparam int NBLOCKS = 200;
  localparam real FMAX_MHZ [4] = '{305.157, 396.471, 547.72, 778.21};

  logic clk = 1'b0, rst = 1'b1, ctr = 1'b1;
  logic [127:0] key, key_last;
  logic [31:0] p_msb, p_lsb, c_msb, c_lsb;
  logic ready;
  int checks = 0, failures = 0;
  longint cycle = 0;

  anu2_encrypt dut (.clk, .rst, .ctr, .KEY(key), .P_MSBi(p_msb), .P_LSBi(p_lsb),
                    .C_MSBi(c_msb), .C_LSBi(c_lsb), .ANU_Ready(ready), .key_last);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    #1000000;
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

  initial begin
    logic [63:0]  pt, ct_exp;
    logic [127:0] k_exp;
    longint start, t_rst_low, t_ready;
    int latency;
    @(posedge clk); #1;
    start = cycle;
    for (int b = 0; b < NBLOCKS; b++) begin
      pt = rand64();
      key = rand128();
      {p_msb, p_lsb} = pt;
      ct_exp = ref_encrypt(pt, key, k_exp);
      rst = 1'b1;                      // one reset clock
      @(posedge clk); #1;
      rst = 1'b0;
      t_rst_low = cycle;
      while (!ready) begin
        @(posedge clk); #1;
      end
      t_ready = cycle;
      latency = int'(t_ready - t_rst_low) - 1;   // minus the load clock
      check(latency == 13, $sformatf("round clocks %0d, expected 13", latency));
      check({c_msb, c_lsb} == ct_exp, $sformatf("block %0d ciphertext", b));
    end
    begin
      real per_block;
      per_block = real'(cycle - start) / NBLOCKS;
      check(per_block == 15.0, $sformatf("%f clocks per block, expected 15", per_block));
      $display("%0d blocks, %0.2f clocks per block (13 round clocks + load + reset)",
               NBLOCKS, per_block);
      foreach (FMAX_MHZ[i])
        $display("  at %0.3f MHz: %0.2f Mbps counting round clocks only, %0.2f Mbps reset to reset",
                 FMAX_MHZ[i], 64.0 * FMAX_MHZ[i] / 13.0, 64.0 * FMAX_MHZ[i] / per_block);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
