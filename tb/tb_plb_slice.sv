// tb_plb_slice: checks a SliceM slice model against a reference written from
// the slice description: LUT lookups, the carry muxes with BX or CARRY-IN,
// sum outputs, clock enable, synchronous set/reset, shift-register mode and
// the stuck-at fault input. Every one of the twelve configurations is loaded
// and driven with random inputs.
module tb_plb_slice;
  import bist_pkg::*;
  logic       clk = 1'b0, cfg_load, use_cin, cin, fault;
  slice_cfg_t cfg;
  slice_in_t  in;
  logic       x, y, xq, yq, cout;
  int checks = 0, failures = 0;

  plb_slice #(.SLICEM(1'b1)) dut (.clk, .cfg_load, .cfg, .in, .use_cin, .cin,
                                  .fault_sa0(fault), .x, .y, .xq, .yq, .cout);

  always #5 clk = ~clk;

  initial begin
    #2000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference state
  logic [15:0] rf, rg;
  logic        rxq, ryq;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    cfg_load = 1'b0; use_cin = 1'b0; cin = 1'b0; fault = 1'b0; in = '0;
    for (int k = 0; k < N_PLB_CFG; k++) begin
      cfg = plb_cfg(k);
      cfg_load = 1'b1;
      @(posedge clk); #1;
      cfg_load = 1'b0;
      rf = cfg.f_lut; rg = cfg.g_lut; rxq = 1'b0; ryq = 1'b0;
      check(xq == 1'b0 && yq == 1'b0, $sformatf("cfg %0d: flip-flops not initialised", k));
      for (int n = 0; n < 300; n++) begin
        logic f, g, c0, c1, ex, ey, ecout, en;
        in      = slice_in_t'($urandom);
        use_cin = 1'($urandom);
        cin     = 1'($urandom);
        fault   = (n > 250);
        #1;
        f  = fault ? 1'b0 : rf[in.f];
        g  = rg[in.g];
        c0 = use_cin ? cin : in.bx;
        c1 = f ? c0 : in.f[0];
        ecout = g ? c1 : in.g[0];
        ex = cfg.x_sum ? f ^ c0 : f;
        ey = cfg.y_sum ? g ^ c1 : g;
        check(x == ex && y == ey && cout == ecout,
              $sformatf("cfg %0d step %0d: x/y/cout %b%b%b expected %b%b%b", k, n, x, y, cout, ex, ey, ecout));
        en = !cfg.ce_used || in.ce;
        @(posedge clk); #1;
        if (cfg.sr_used && in.sr) begin rxq = cfg.sr_val; ryq = cfg.sr_val; end
        else if (en) begin rxq = ex; ryq = ey; end
        if (cfg.srl && en) begin rf = {rf[14:0], in.bx}; rg = {rg[14:0], in.by}; end
        check(xq == rxq && yq == ryq, $sformatf("cfg %0d step %0d: xq/yq %b%b expected %b%b", k, n, xq, yq, rxq, ryq));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
