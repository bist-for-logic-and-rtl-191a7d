// tb_lutram_but: random writes and reads in the three LUT RAM modes,
// checked against a reference of each mode (64x1, two 32x1 with shared
// inputs, 16x2 with a second read port), then the stuck-at bit.
module tb_lutram_but;
  import bist_pkg::*;
  logic clk = 1'b0, fault_en, init;
  lutram_mode_e mode;
  lutram_vec_t  vec;
  logic [3:0]   out;
  int checks = 0, failures = 0;
  bit m64 [64];
  bit m32a [32], m32b [32];
  logic [1:0] m16 [16];

  lutram_but #(.FAULT_BIT(5)) dut (.clk, .init, .mode, .vec, .fault_en, .out);

  always #5 clk = ~clk;

  initial begin
    #1000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fault_en = 1'b0; init = 1'b1; vec = '0; mode = LR_64X1_SP;
    @(posedge clk); #1;
    init = 1'b0;
    #1;
    checks++;
    if (out != 0) failures++;
    for (int m = 0; m < 3; m++) begin
      mode = lutram_mode_e'(m);
      vec = '0; vec.we = 1'b1;
      // initialise every word through the write port
      for (int a = 0; a < 64; a++) begin
        vec.wa = 6'(a); vec.d = 2'b00;
        @(posedge clk); #1;
      end
      for (int a = 0; a < 64; a++) m64[a] = 0;
      for (int a = 0; a < 32; a++) begin m32a[a] = 0; m32b[a] = 0; end
      for (int a = 0; a < 16; a++) m16[a] = 2'b00;
      for (int n = 0; n < 1000; n++) begin
        logic [3:0] exp;
        vec = lutram_vec_t'($urandom);
        vec.unused = '0;
        #1;
        exp = '0;
        case (mode)
          LR_64X1_SP: exp[0] = m64[vec.wa];
          LR_32X1_SP: exp[1:0] = {m32b[vec.wa[4:0]], m32a[vec.wa[4:0]]};
          default:    exp = {m16[vec.ra], m16[vec.wa[3:0]]};
        endcase
        checks++;
        if (out != exp) begin
          failures++;
          if (failures < 10) $display("mode %0d: out %b expected %b", m, out, exp);
        end
        @(posedge clk); #1;
        if (vec.we) case (mode)
          LR_64X1_SP: m64[vec.wa] = vec.d[0];
          LR_32X1_SP: begin m32a[vec.wa[4:0]] = vec.d[0]; m32b[vec.wa[4:0]] = vec.d[0]; end
          default:    m16[vec.wa[3:0]] = vec.d;
        endcase
      end
    end
    // stuck-at-0 at bit 5: 64x1 word 5
    mode = LR_64X1_SP; vec = '0; vec.we = 1'b1; vec.wa = 6'd5; vec.d = 2'b11;
    @(posedge clk); #1;
    vec.we = 1'b0; fault_en = 1'b1; #1;
    checks++; if (out[0] != 1'b0) failures++;
    fault_en = 1'b0; #1;
    checks++; if (out[0] != 1'b1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
