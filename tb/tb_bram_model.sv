// tb_bram_model: random reads and writes on both ports in every aspect
// ratio, checked against a bit array kept by the testbench (read-first,
// port B winning a same-bit collision, zero above the configured width),
// then the stuck-at cell and the clear on init.
module tb_bram_model;
  import bist_pkg::*;
  logic clk = 1'b0, init, fault_en, en_a, we_a, en_b, we_b;
  logic [5:0]  width;
  logic [13:0] addr_a, addr_b;
  logic [35:0] din_a, din_b, dout_a, dout_b;
  int checks = 0, failures = 0;
  bit ref_mem [BRAM_BITS];
  localparam int FB = 1000;

  bram_model #(.FAULT_BIT(FB)) dut (.clk, .init, .width, .fault_en, .en_a, .we_a, .addr_a,
    .din_a, .dout_a, .en_b, .we_b, .addr_b, .din_b, .dout_b);

  always #5 clk = ~clk;

  initial begin
    #5000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [35:0] ref_read(logic [13:0] a, int w, bit flt);
    logic [35:0] d = '0;
    for (int i = 0; i < w; i++) begin
      int idx = int'(a) * w + i;
      d[i] = ref_mem[idx] && !(flt && idx == FB);
    end
    return d;
  endfunction

  initial begin
    int widths [6] = '{1, 2, 4, 9, 18, 36};
    init = 1'b1; fault_en = 1'b0; en_a = 0; we_a = 0; en_b = 0; we_b = 0;
    width = 6'd1; addr_a = '0; addr_b = '0; din_a = '0; din_b = '0;
    @(posedge clk); #1;
    init = 1'b0;
    for (int wi = 0; wi < 6; wi++) begin
      int w, depth;
      w = widths[wi];
      depth = (w < 9) ? 16384 / w : BRAM_BITS / w;
      width = 6'(w);
      for (int n = 0; n < 3000; n++) begin
        logic [35:0] ea, eb;
        en_a = 1'($urandom); we_a = 1'($urandom);
        en_b = 1'($urandom); we_b = 1'($urandom);
        // small address window so reads hit written words
        addr_a = 14'($urandom % 32); addr_b = 14'($urandom % 32);
        if (n % 7 == 0) begin addr_a = 14'(depth - 1 - ($urandom % 4)); addr_b = addr_a; end
        din_a = 36'({$urandom, $urandom}); din_b = 36'({$urandom, $urandom});
        ea = ref_read(addr_a, w, 1'b0);
        eb = ref_read(addr_b, w, 1'b0);
        @(posedge clk); #1;
        if (en_a) begin
          checks++;
          if (dout_a != ea) begin failures++; if (failures < 10) $display("w%0d A @%0d: %h expected %h", w, addr_a, dout_a, ea); end
        end
        if (en_b) begin
          checks++;
          if (dout_b != eb) begin failures++; if (failures < 10) $display("w%0d B @%0d: %h expected %h", w, addr_b, dout_b, eb); end
        end
        for (int i = 0; i < w; i++) begin
          if (en_a && we_a) ref_mem[int'(addr_a) * w + i] = din_a[i];
          if (en_b && we_b) ref_mem[int'(addr_b) * w + i] = din_b[i];
        end
      end
    end
    // stuck-at-0 cell: width 1, address FB
    width = 6'd1; fault_en = 1'b1;
    en_a = 1; we_a = 1; addr_a = 14'(FB); din_a = 36'h1; en_b = 0; we_b = 0;
    @(posedge clk); #1;
    we_a = 0;
    @(posedge clk); #1;
    checks++;
    if (dout_a != 0) failures++;
    fault_en = 1'b0;
    @(posedge clk); #1;
    checks++;
    if (dout_a != 36'h1) failures++;
    // init clears
    init = 1'b1; @(posedge clk); #1; init = 1'b0;
    @(posedge clk); #1;
    checks++;
    if (dout_a != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
