// tb_plb_cell: two PLBs stacked in one column (an even row below an odd
// row) as BUTs, checked against a reference of the four-slice carry
// columns for the non-shift-register configurations, including which row
// takes CARRY-IN and which takes BX; then the ORA role of a PLB with random
// left/right outputs and the role switch that clears the flags.
module tb_plb_cell;
  import bist_pkg::*;
  logic clk = 1'b0, cfg_load, is_ora, ora_clr;
  slice_cfg_t cfg;
  slice_in_t  tin;
  logic [1:0] c01, cout1, cin0;
  logic [7:0] obs0, obs1, lo, ro, fail0, fail1;
  int checks = 0, failures = 0;

  plb_cell #(.ROW_ODD(1'b0)) u0 (.clk, .is_ora(1'b0), .cfg_load, .cfg, .tpg_in(tin),
    .cin(cin0), .cout(c01), .fault(1'b0), .obs(obs0), .ora_clr, .left_obs(lo),
    .right_obs(ro), .ora_fail(fail0));
  plb_cell #(.ROW_ODD(1'b1)) u1 (.clk, .is_ora, .cfg_load, .cfg, .tpg_in(tin),
    .cin(c01), .cout(cout1), .fault(1'b0), .obs(obs1), .ora_clr, .left_obs(lo),
    .right_obs(ro), .ora_fail(fail1));

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

  // one slice: returns {cout, y, x}
  function automatic logic [2:0] slice_ref(slice_cfg_t c, slice_in_t i, logic c_in);
    logic f, g, c1, x, y, co;
    f  = c.f_lut[i.f];
    g  = c.g_lut[i.g];
    c1 = f ? c_in : i.f[0];
    co = g ? c1 : i.g[0];
    x  = c.x_sum ? f ^ c_in : f;
    y  = c.y_sum ? g ^ c1 : g;
    return {co, y, x};
  endfunction

  // one PLB: observed {y3,x3,...,y0,x0} and carry outs
  function automatic logic [9:0] plb_ref(slice_cfg_t c, slice_in_t i, logic odd, logic [1:0] c_in);
    logic [7:0] o;
    logic [1:0] co;
    for (int col = 0; col < 2; col++) begin
      logic [2:0] b, t;
      logic       start;
      start = (odd == c.carry_odd) ? c_in[col] : i.bx;
      b = slice_ref(c, i, start);
      t = slice_ref(c, i, b[2]);
      o[4*col +: 4] = {t[1], t[0], b[1], b[0]};
      co[col] = t[2];
    end
    return {co, o};
  endfunction

  initial begin
    cfg_load = 1'b0; is_ora = 1'b0; ora_clr = 1'b1; lo = '0; ro = '0; cin0 = '0; tin = '0;
    for (int k = 0; k < 10; k++) begin
      cfg = plb_cfg(k);
      cfg_load = 1'b1;
      @(posedge clk); #1;
      cfg_load = 1'b0;
      for (int n = 0; n < 200; n++) begin
        logic [9:0] r0, r1;
        tin  = slice_in_t'($urandom);
        tin.ce = 1'b1; tin.sr = 1'b0;
        cin0 = 2'($urandom);
        #1;
        r0 = plb_ref(cfg, tin, 1'b0, cin0);
        r1 = plb_ref(cfg, tin, 1'b1, r0[9:8]);
        check(cout1 == r1[9:8], $sformatf("cfg %0d: carry out %b expected %b", k, cout1, r1[9:8]));
        @(posedge clk); #1;
        check(obs0 == r0[7:0], $sformatf("cfg %0d: even-row obs %h expected %h", k, obs0, r0[7:0]));
        check(obs1 == r1[7:0], $sformatf("cfg %0d: odd-row obs %h expected %h", k, obs1, r1[7:0]));
      end
    end
    // ORA role
    begin
      logic [7:0] model;
      is_ora = 1'b1; ora_clr = 1'b1;
      @(posedge clk); #1;
      ora_clr = 1'b0; model = '0;
      for (int n = 0; n < 200; n++) begin
        lo = 8'($urandom);
        ro = lo ^ ((($urandom % 16) == 0) ? 8'(1 << ($urandom % 8)) : 8'h00);
        @(posedge clk); #1;
        model |= lo ^ ro;
        check(fail1 == model, $sformatf("ORA flags %h expected %h", fail1, model));
        check(fail0 == 8'h00, "BUT-role PLB shows ORA flags");
      end
      check(model != 0, "no mismatch was applied");
      is_ora = 1'b0;
      @(posedge clk); #1;
      check(fail1 == 8'h00, "flags not cleared when the role changes");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
