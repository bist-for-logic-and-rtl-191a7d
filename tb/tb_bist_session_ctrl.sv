// tb_bist_session_ctrl: runs a session of 3 configurations of 20 patterns
// and checks the order of ora_clr, cfg_load/tpg_init and cfg_idx, the length
// of every run, and the total of N_CFG x (1 + PATTERNS + FLUSH) clocks.
module tb_bist_session_ctrl;
  localparam int N_CFG = 3, PATTERNS = 20, FLUSH = 2;
  logic clk = 1'b0, rst, start, ora_clr, cfg_load, tpg_init, running, done;
  logic [1:0] cfg_idx;
  int checks = 0, failures = 0;

  bist_session_ctrl #(.N_CFG(N_CFG), .PATTERNS(PATTERNS), .FLUSH(FLUSH)) dut (
    .clk, .rst, .start, .ora_clr, .cfg_load, .tpg_init, .cfg_idx, .running, .done);

  always #5 clk = ~clk;

  initial begin
    #100000 failures++;
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
    int cyc, loads, clrs, last_load;
    rst = 1'b1; start = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    check(!running && !done, "not idle after reset");
    for (int rep = 0; rep < 2; rep++) begin
      start = 1'b1;
      @(posedge clk); #1;
      start = 1'b0;
      cyc = 0; loads = 0; clrs = 0; last_load = -1;
      while (!done && cyc < 1000) begin
        if (ora_clr) begin
          clrs++;
          check(loads == 0 && cfg_load, "ORA clear not with the first configuration load");
        end
        if (cfg_load) begin
          check(tpg_init, "cfg_load without tpg_init");
          check(cfg_idx == 2'(loads), $sformatf("cfg_idx %0d at load %0d", cfg_idx, loads));
          if (last_load >= 0)
            check(cyc - last_load == 1 + PATTERNS + FLUSH, $sformatf("run length %0d", cyc - last_load));
          last_load = cyc;
          loads++;
        end
        @(posedge clk); #1;
        cyc++;
      end
      check(clrs == 1, $sformatf("%0d ORA clears", clrs));
      check(loads == N_CFG, $sformatf("%0d loads", loads));
      check(cyc == N_CFG * (1 + PATTERNS + FLUSH), $sformatf("session took %0d clocks", cyc));
      repeat (3) @(posedge clk);
      #1 check(done && !running, "done not held");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
