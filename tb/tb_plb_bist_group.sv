// tb_plb_bist_group: runs complete test sessions on a four-row group of
// 8 columns. Fault-free, no ORA may flag. With a stuck-at fault in one BUT,
// the two ORAs beside it (circularly) must flag output 0 in the BUT's row,
// and no ORA outside those two columns and the rows reached by its carry may
// flag. Done in both sessions, so each PLB column is tested once as a BUT.
// Also checks that the two TPGs run in step.
module tb_plb_bist_group;
  import bist_pkg::*;
  localparam int COLS = 8;
  logic clk = 1'b0, session, tpg_init, cfg_load, ora_clr;
  slice_cfg_t cfg;
  logic [1:0] cin_bot [COLS], cout_top [COLS];
  logic       fault [4][COLS];
  logic [7:0] ora_fail [4][COLS];
  logic [11:0] tpg_pattern [2];
  int checks = 0, failures = 0;

  plb_bist_group #(.COLS(COLS)) dut (.clk, .session, .tpg_init, .cfg_load, .cfg,
    .ora_clr, .cin_bot, .cout_top, .fault, .ora_fail, .tpg_pattern);

  always #5 clk = ~clk;

  initial begin
    #5000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  task automatic run_session();
    for (int k = 0; k < N_PLB_CFG; k++) begin
      cfg = plb_cfg(k);
      cfg_load = 1'b1; tpg_init = 1'b1; ora_clr = (k == 0);
      @(posedge clk); #1;
      cfg_load = 1'b0; tpg_init = 1'b0; ora_clr = 1'b0;
      repeat (4096 + 2) begin
        @(posedge clk); #1;
        if (tpg_pattern[0] != tpg_pattern[1]) begin
          checks++; failures++;
        end
      end
    end
  endtask

  task automatic check_flags(input int fr, input int fc, input string tag);
    int flagged = 0;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < COLS; c++) begin
        bit near;
        near = (fr >= 0) && (c == (fc + 1) % COLS || c == (fc + COLS - 1) % COLS)
               && (r == fr || r == fr + 1);
        if (ora_fail[r][c] != 0) flagged++;
        if (!near) check(ora_fail[r][c] == 0, $sformatf("%s: ORA (%0d,%0d) flags %h", tag, r, c, ora_fail[r][c]));
      end
    if (fr >= 0) begin
      check(ora_fail[fr][(fc + 1) % COLS][0], $sformatf("%s: right ORA missed the fault", tag));
      check(ora_fail[fr][(fc + COLS - 1) % COLS][0], $sformatf("%s: left ORA missed the fault", tag));
    end
    $display("%s: %0d ORA PLBs flagged", tag, flagged);
  endtask

  initial begin
    tpg_init = 1'b0; cfg_load = 1'b0; ora_clr = 1'b0; cfg = plb_cfg(0);
    for (int c = 0; c < COLS; c++) cin_bot[c] = 2'b00;
    for (int r = 0; r < 4; r++) for (int c = 0; c < COLS; c++) fault[r][c] = 1'b0;

    session = 1'b0;
    run_session();
    check_flags(-1, 0, "session 0 fault-free");

    fault[1][3] = 1'b1;             // odd column: a BUT in session 0
    run_session();
    check_flags(1, 3, "session 0 fault at (1,3)");
    fault[1][3] = 1'b0;

    session = 1'b1;
    fault[2][4] = 1'b1;             // even column: a BUT in session 1
    run_session();
    check_flags(2, 4, "session 1 fault at (2,4)");
    fault[2][4] = 1'b0;

    fault[3][0] = 1'b1;             // wrap-around: ORAs in columns 7 and 1
    run_session();
    check_flags(3, 0, "session 1 fault at (3,0)");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
