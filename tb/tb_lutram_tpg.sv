// tb_lutram_tpg: runs the TPG in each mode against a RAM held in the
// testbench. Every read vector must find the value March Y expects (carried
// in the vector's data field), the run must hold 512, 256 and 128 vectors,
// with both address orders present, and done must follow the last vector.
module tb_lutram_tpg;
  import bist_pkg::*;
  logic clk = 1'b0, rst, start, busy, done;
  lutram_mode_e mode;
  lutram_vec_t  vec;
  int checks = 0, failures = 0;
  bit mem [64];

  lutram_tpg dut (.clk, .rst, .start, .mode, .vec, .busy, .done);

  always #5 clk = ~clk;

  initial begin
    #2000000 failures++;
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

  initial begin
    int lens [3] = '{512, 256, 128};
    int words [3] = '{64, 32, 16};
    rst = 1'b1; start = 1'b0; mode = LR_64X1_SP;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int m = 0; m < 3; m++) begin
      int nvec, writes, reads, cyc, ups, downs, last_a;
      nvec = 0; writes = 0; reads = 0; cyc = 0; ups = 0; downs = 0; last_a = -1;
      mode = lutram_mode_e'(m);
      for (int a = 0; a < 64; a++) mem[a] = 1'($urandom);
      start = 1'b1;
      @(posedge clk); #1;
      start = 1'b0;
      while (!done && cyc < 2000) begin
        if (busy && (nvec < lens[m]) && (cyc >= 1)) begin
          check(int'(vec.wa) < words[m], "address outside the RAM");
          if (vec.we) begin mem[vec.wa] = vec.d[0]; writes++; end
          else begin
            check(mem[vec.wa] == vec.d[0], $sformatf("mode %0d vector %0d: read finds %b, expects %b", m, nvec, mem[vec.wa], vec.d[0]));
            if (m == 2) check(vec.ra == vec.wa[3:0], "second port not on the addressed word");
            reads++;
          end
          if (last_a >= 0 && int'(vec.wa) == last_a + 1) ups++;
          if (last_a >= 0 && int'(vec.wa) == last_a - 1) downs++;
          last_a = int'(vec.wa);
          nvec++;
        end
        @(posedge clk); #1;
        cyc++;
      end
      check(nvec == lens[m], $sformatf("mode %0d: %0d vectors, expected %0d", m, nvec, lens[m]));
      check(writes == 3 * words[m] && reads == 5 * words[m], $sformatf("mode %0d: %0d writes %0d reads", m, writes, reads));
      check(cyc == lens[m] + 1, $sformatf("mode %0d: done after %0d clocks", m, cyc));
      check(ups > 0 && downs > 0, "missing an address order");
      check(vec == '0, "vector not idle after the run");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
