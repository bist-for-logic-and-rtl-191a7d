// tb_v4_bist_top: end-to-end test of the whole BIST on a reduced array
// (16 x 8 PLBs in four four-row groups, 4 block RAMs).
//
// PLB BIST: a fault-free session 0, a session 0 with a stuck-at fault in one
// BUT, and a session 1 (roles swapped) with a fault in a column that was an
// ORA column before. After each session every ORA frame is read back and
// the flags are checked: none fault-free; with a fault, the two ORAs beside
// the faulty BUT must flag, and nothing outside those two columns and the
// rows its carry reaches. LUT RAM BIST: the three RAM modes, fault-free and
// with a stuck-at bit, flagged by exactly the two PLBs that compare it.
// Block RAM BIST: all three configurations are run,
// each with a stuck-at cell in RAM 1, which must be flagged by ORA sets 0
// and 1 only. Counts how often each mechanism happened (both sessions,
// configurations that take CARRY-IN on odd and on even rows, shift-register
// configurations, frame reads, detected faults, both march algorithms) and
// fails for any that never did. Also checks the session length.
module tb_v4_bist_top;
  import bist_pkg::*;
  localparam int ROWS = 16, COLS = 8, NB = 4;
  localparam int NF = ROWS * COLS / 32;
  localparam bit FULL = 1'b0;
  localparam int FAW = (NF > 1) ? $clog2(NF) : 1;

  logic clk = 1'b0, rst, session, plb_start, plb_running, plb_done;
  logic [3:0] plb_cfg_idx, prev_idx;
  logic       prev_running = 1'b0;
  logic fault_plb [ROWS][COLS];
  logic frame_rd, frame_valid;
  logic [FAW-1:0] frame_addr;
  logic [127:0] frame_data;
  logic lut_init, lut_ora_clr, lut_start, lut_done;
  lutram_mode_e lut_mode;
  logic fault_lut [ROWS][COLS];
  logic [3:0] lut_ora_fail [ROWS][COLS];
  logic bram_init, bram_ora_clr, bram_start, bram_done;
  logic [1:0] bram_cfg_sel;
  logic [NB-1:0] bram_fault_en;
  logic [71:0] bram_ora_fail [NB];
  int checks = 0, failures = 0;

  // mechanism counters
  int n_session [2], n_cin_odd, n_cin_even, n_srl, n_frames, n_plb_detect;
  int n_alg [4], n_bram_detect, n_lut_mode [3], n_lut_detect;

  v4_bist_top #(.ROWS(ROWS), .COLS(COLS), .N_BRAM(NB)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (FULL ? 400000 : 800000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // count the configurations the session controller applies
  always @(posedge clk) begin
    if (plb_running && (!prev_running || plb_cfg_idx != prev_idx)) begin
      slice_cfg_t c;
      c = plb_cfg(int'(plb_cfg_idx));
      if (c.srl) n_srl++;
      else if (c.x_sum && c.carry_odd) n_cin_odd++;
      else if (c.x_sum) n_cin_even++;
    end
    prev_running <= plb_running;
    prev_idx     <= plb_cfg_idx;
  end

  task automatic plb_session(input bit s, input int fr, input int fc, input string tag);
    int cyc = 0, flagged = 0;
    session = s;
    for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++) fault_plb[r][c] = 1'b0;
    if (fr >= 0) fault_plb[fr][fc] = 1'b1;
    plb_start = 1'b1;
    @(posedge clk); #1;
    plb_start = 1'b0;
    while (!plb_done && cyc < 100000) begin @(posedge clk); #1; cyc++; end
    check(cyc == N_PLB_CFG * (1 + 4096 + 2), $sformatf("%s: session took %0d clocks", tag, cyc));
    n_session[s]++;
    // read back every ORA frame
    for (int f = 0; f < NF; f++) begin
      int blk = f / (COLS / 2);
      int col = 2 * (f % (COLS / 2)) + int'(s);
      frame_rd = 1'b1; frame_addr = FAW'(f);
      @(posedge clk); #1;
      frame_rd = 1'b0;
      check(frame_valid, "frame not valid");
      n_frames++;
      for (int k = 0; k < 16; k++) begin
        int r = 16 * blk + k;
        logic [7:0] fl = frame_data[8*k +: 8];
        bit near_col = (fr >= 0) && (col == (fc + 1) % COLS || col == (fc + COLS - 1) % COLS);
        bit near = near_col && (r == fr || r == fr + 1);
        if (fl != 0) flagged++;
        if (!near) check(fl == 0, $sformatf("%s: ORA at (%0d,%0d) flags %h", tag, r, col, fl));
        if (near_col && r == fr) begin
          check(fl[0], $sformatf("%s: ORA at (%0d,%0d) missed the fault", tag, r, col));
          if (fl[0]) n_plb_detect++;
        end
      end
    end
    $display("%s: %0d clocks, %0d ORA PLBs flagged", tag, cyc, flagged);
  endtask

  task automatic lut_run(input int m, input int fr, input int fc);
    int cyc = 0, exp_len;
    lut_mode = lutram_mode_e'(m);
    exp_len = int'(lutram_len(lut_mode));
    for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++) fault_lut[r][c] = 1'b0;
    if (fr >= 0) fault_lut[fr][fc] = 1'b1;
    lut_init = 1'b1; lut_ora_clr = 1'b1;
    @(posedge clk); #1;
    lut_init = 1'b0; lut_ora_clr = 1'b0; lut_start = 1'b1;
    @(posedge clk); #1;
    lut_start = 1'b0;
    while (!lut_done && cyc < 10000) begin @(posedge clk); #1; cyc++; end
    check(cyc == exp_len + 1, $sformatf("LUT RAM mode %0d took %0d clocks", m, cyc));
    n_lut_mode[m]++;
    for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++) begin
      bit exp = (fr >= 0) && r == fr && (c == fc || c == (fc + COLS - 1) % COLS);
      check((lut_ora_fail[r][c] != 0) == exp, $sformatf("LUT RAM mode %0d: ORA (%0d,%0d) = %b", m, r, c, lut_ora_fail[r][c]));
      if (exp && lut_ora_fail[r][c] != 0) n_lut_detect++;
    end
    $display("LUT RAM mode %0d: %0d clocks", m, cyc);
  endtask

  task automatic bram_run(input int sel, input int faulty);
    int cyc = 0;
    bram_cfg_t c = bram_cfg(sel);
    bram_cfg_sel = 2'(sel);
    bram_fault_en = '0;
    if (faulty >= 0) bram_fault_en[faulty] = 1'b1;
    bram_init = 1'b1; bram_ora_clr = 1'b1;
    @(posedge clk); #1;
    bram_init = 1'b0; bram_ora_clr = 1'b0; bram_start = 1'b1;
    @(posedge clk); #1;
    bram_start = 1'b0;
    while (!bram_done && cyc < 400000) begin @(posedge clk); #1; cyc++; end
    if (c.alg == ALG_MATS_PLUS) check(cyc == 2 * 5 * int'(c.depth), $sformatf("MATS+ took %0d clocks", cyc));
    else                        check(cyc == (14 + 4 * N_BDS) * int'(c.depth), $sformatf("March LR took %0d clocks", cyc));
    n_alg[c.alg]++;
    repeat (2) @(posedge clk); #1;
    for (int k = 0; k < NB; k++) begin
      bit exp = (faulty >= 0) && (k == faulty || k == (faulty + NB - 1) % NB);
      check((bram_ora_fail[k] != 0) == exp, $sformatf("block RAM cfg %0d: ORA set %0d = %h", sel, k, bram_ora_fail[k]));
      if (exp && bram_ora_fail[k] != 0) n_bram_detect++;
    end
    $display("block RAM configuration %0d: %0d clocks", sel, cyc);
  endtask

  initial begin
    rst = 1'b1; session = 1'b0; plb_start = 1'b0; frame_rd = 1'b0; frame_addr = '0;
    bram_init = 1'b0; bram_ora_clr = 1'b0; bram_start = 1'b0; bram_cfg_sel = '0; bram_fault_en = '0;
    lut_init = 1'b0; lut_ora_clr = 1'b0; lut_start = 1'b0; lut_mode = LR_64X1_SP;
    for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++) fault_lut[r][c] = 1'b0;
    for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++) fault_plb[r][c] = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;

    if (!FULL) plb_session(1'b0, -1, 0, "session 0, fault-free");
    plb_session(1'b0, 5, 3, "session 0, fault at (5,3)");
    plb_session(1'b1, ROWS - 5, COLS - 2, "session 1, fault in an even column");

    lut_run(0, -1, 0);
    lut_run(0, 6, 2);
    lut_run(1, 9, 0);
    lut_run(2, ROWS - 1, COLS - 1);

    if (FULL) begin
      bram_run(0, 1);
    end else begin
      bram_run(0, -1);
      bram_run(0, 1);
      bram_run(1, 1);
      bram_run(2, 1);
    end

    check(n_session[0] > 0 && n_session[1] > 0, "a session was never run");
    check(n_cin_odd > 0, "no configuration took CARRY-IN on odd rows");
    check(n_cin_even > 0, "no configuration took CARRY-IN on even rows");
    check(n_srl > 0, "no shift-register configuration");
    check(n_frames == (FULL ? 2 : 3) * NF, $sformatf("%0d frames read", n_frames));
    check(n_plb_detect >= 4, $sformatf("PLB faults seen by %0d ORAs", n_plb_detect));
    check(n_alg[0] > 0 && (FULL || n_alg[1] > 0), "a march algorithm was never run");
    check(n_bram_detect > 0, "no block RAM fault detected");
    check(n_lut_mode[0] > 0 && n_lut_mode[1] > 0 && n_lut_mode[2] > 0, "a LUT RAM mode was never tested");
    check(n_lut_detect >= 6, $sformatf("LUT RAM faults seen by %0d ORA PLBs", n_lut_detect));
    $display("LUT RAM modes %0d/%0d/%0d, LUT RAM detections %0d", n_lut_mode[0], n_lut_mode[1], n_lut_mode[2], n_lut_detect);
    $display("mechanisms: sessions %0d/%0d, CARRY-IN odd %0d even %0d, shift-register %0d, frames %0d, PLB detections %0d, March LR %0d, MATS+ %0d, RAM detections %0d",
             n_session[0], n_session[1], n_cin_odd, n_cin_even, n_srl, n_frames, n_plb_detect,
             n_alg[0], n_alg[1], n_bram_detect);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
