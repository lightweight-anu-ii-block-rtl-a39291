// tb_anu2_ctrl: checks the controller's state sequence for two rounds per
// clock (the default) and one round per clock: one load clock, then run
// clocks with the round counter 0, U, 2U, ... (13 of them for U = 2, 25 for
// U = 1), then ready held until reset; ctr low must freeze everything.
module tb_anu2_ctrl;
  logic clk = 1'b0, rst, ctr;
  logic load2, run2, ready2, load1, run1, ready1;
  logic [4:0] rc2, rc1;
  int checks = 0, failures = 0;

  anu2_ctrl dut2 (.clk, .rst, .ctr, .load(load2), .run(run2), .rc(rc2), .ready(ready2));
  anu2_ctrl #(.ROUNDS(25), .UNROLL(1)) dut1 (.clk, .rst, .ctr, .load(load1), .run(run1),
                                             .rc(rc1), .ready(ready1));

  always #5 clk = ~clk;

  initial begin
    #20000;
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

  // Walk one block through the controller with unroll factor u, sampling
  // between edges. Optionally drop ctr for a few clocks after run clock 3.
  task automatic one_block(int u, bit stall);
    int runs = 0;
    rst = 1'b1; ctr = 1'b1;
    @(posedge clk); @(posedge clk);
    #1 rst = 1'b0;
    #1;
    check(u == 2 ? load2 : load1, "load in S0");
    check(!(u == 2 ? ready2 : ready1), "not ready in S0");
    @(posedge clk); #1;
    while ((u == 2 ? run2 : run1)) begin
      check((u == 2 ? rc2 : rc1) == 5'(runs * u), "round counter value");
      runs++;
      if (stall && runs == 3) begin
        logic [4:0] held = (u == 2 ? rc2 : rc1);
        ctr = 1'b0;
        #1;
        check(!(u == 2 ? run2 : run1), "run low while ctr low");
        repeat (4) @(posedge clk);
        #1;
        check((u == 2 ? rc2 : rc1) == held, "counter frozen while ctr low");
        ctr = 1'b1;
        #1;
      end
      @(posedge clk); #1;
      if (runs > 40) break;
    end
    check(runs == (u == 2 ? 13 : 25), $sformatf("run clocks %0d for unroll %0d", runs, u));
    check((u == 2 ? ready2 : ready1), "ready after the last run clock");
    check((u == 2 ? rc2 : rc1) == 0, "rc cleared in S2");
    repeat (3) @(posedge clk);
    #1;
    check((u == 2 ? ready2 && !run2 && !load2 : ready1 && !run1 && !load1), "S2 held");
  endtask

  initial begin
    one_block(2, 1'b0);
    one_block(2, 1'b1);
    one_block(1, 1'b0);
    one_block(1, 1'b1);
    // Reset from S2 back to S0.
    rst = 1'b1;
    @(posedge clk); #1;
    check(load2 && !ready2, "reset returns to S0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
