// tb_lutram_bist_group: a four-row group of 6 columns runs each LUT RAM
// configuration fault-free (no ORA may flag) and with a stuck-at bit in one
// LUT RAM, which must be flagged by the ORAs of its own PLB and of the PLB
// to its left (the two that compare it), and by no other.
module tb_lutram_bist_group;
  import bist_pkg::*;
  localparam int COLS = 6;
  logic clk = 1'b0, rst, ora_clr, init, start, done;
  lutram_mode_e mode;
  logic fault [4][COLS];
  logic [3:0] ora_fail [4][COLS];
  int checks = 0, failures = 0;

  lutram_bist_group #(.COLS(COLS)) dut (.clk, .rst, .ora_clr, .init, .start, .mode, .fault, .done, .ora_fail);

  always #5 clk = ~clk;

  initial begin
    #2000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int m, input int fr, input int fc);
    int cyc = 0;
    mode = lutram_mode_e'(m);
    for (int r = 0; r < 4; r++) for (int c = 0; c < COLS; c++) fault[r][c] = 1'b0;
    if (fr >= 0) fault[fr][fc] = 1'b1;
    ora_clr = 1'b1; init = 1'b1;
    @(posedge clk); #1;
    ora_clr = 1'b0; init = 1'b0; start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0;
    while (!done && cyc < 2000) begin @(posedge clk); #1; cyc++; end
    checks++;
    if (!done) failures++;
    for (int r = 0; r < 4; r++) for (int c = 0; c < COLS; c++) begin
      bit exp = (fr >= 0) && r == fr && (c == fc || c == (fc + COLS - 1) % COLS);
      checks++;
      if ((ora_fail[r][c] != 0) != exp) begin
        failures++;
        $display("mode %0d fault (%0d,%0d): ORA (%0d,%0d) = %b", m, fr, fc, r, c, ora_fail[r][c]);
      end
    end
  endtask

  initial begin
    rst = 1'b1; ora_clr = 1'b0; init = 1'b0; start = 1'b0; mode = LR_64X1_SP;
    for (int r = 0; r < 4; r++) for (int c = 0; c < COLS; c++) fault[r][c] = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int m = 0; m < 3; m++) begin
      run(m, -1, 0);
      run(m, 2, 3);
      run(m, 1, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
