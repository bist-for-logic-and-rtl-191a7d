// tb_acc_tpg: checks the accumulator TPG sequence (n x 0x691 after init),
// that its 12 output bits cover all 4,096 values in 4,096 clocks, and that
// no output bit toggles less often than the same bit of a counter, and in
// total the bits toggle more often.
module tb_acc_tpg;
  import bist_pkg::*;
  logic        clk = 1'b0, init;
  logic [11:0] pattern;
  logic [47:0] acc;
  int checks = 0, failures = 0;
  bit seen [4096];
  int toggles [12];
  logic [11:0] prev;

  acc_tpg dut (.clk, .init, .pattern, .acc);

  always #5 clk = ~clk;

  initial begin
    #200000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    init = 1'b1;
    @(posedge clk); #1;
    init = 1'b0;
    prev = pattern;
    for (int n = 0; n < 4096; n++) begin
      logic [47:0] exp_acc;
      exp_acc = 48'(n) * 48'h691;
      check(acc == exp_acc, $sformatf("acc at step %0d = %h, expected %h", n, acc, exp_acc));
      check(pattern == exp_acc[11:0], $sformatf("pattern at step %0d", n));
      seen[pattern] = 1'b1;
      for (int b = 0; b < 12; b++) if (pattern[b] != prev[b]) toggles[b]++;
      prev = pattern;
      @(posedge clk); #1;
    end
    begin
      int missing = 0;
      for (int v = 0; v < 4096; v++) if (!seen[v]) missing++;
      check(missing == 0, $sformatf("%0d patterns never generated", missing));
    end
    // a 12-bit counter toggles bit b 4096 / 2^b times per period
    begin
      int total = 0, counter_total = 0;
      for (int b = 0; b < 12; b++) begin
        check(toggles[b] >= (4096 >> b) - 1, $sformatf("bit %0d toggles %0d times", b, toggles[b]));
        total += toggles[b];
        counter_total += (4096 >> b) - 1;
      end
      check(total > counter_total, $sformatf("%0d toggles, a counter gives %0d", total, counter_total));
    end
    // init restarts the sequence at 0
    init = 1'b1; @(posedge clk); #1; init = 1'b0;
    check(acc == 0 && pattern == 0, "init does not clear");
    @(posedge clk); #1;
    check(pattern == 12'h691, "first step after init");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
