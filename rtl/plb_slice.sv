// plb_slice: behavioural-level RTL of one Virtex-4 slice, the smallest block
// under test of the PLB BIST.
//
// Two 4-input LUTs (F and G) feed carry and control logic and two
// flip-flops. The LUT contents and control options are held in a
// configuration register loaded by cfg_load, which stands for a (partial)
// reconfiguration of the slice; cfg_load also sets both flip-flops to 0, the
// configured initial value. In a SliceM (SLICEM = 1) the LUTs can instead act
// as 16-bit shift registers shifting in BX (F) and BY (G), read at the
// address on the LUT inputs.
//
// Carry logic: the carry into the F stage is either CARRY-IN or BX
// (use_cin). Each stage passes its carry when the LUT output is 1 and
// otherwise takes the LUT's first input (F1 or G1); X and Y are the LUT
// outputs or their sum with the stage carry. The flip-flops take X and Y,
// with optional synchronous set/reset (SR) and clock enable (CE).
//
// From the source design: 2 LUT4s, 2 flip-flops, the inputs G1:4, F1:4, BX,
// BY, clock, enable, set/reset, carry in/out, outputs X, Y, XQ, YQ, and the
// SliceM shift-register mode. The exact carry mux inputs and the
// synchronous set/reset are simplifications of this model; latch mode and
// clock inversion are not modelled. fault_sa0 forces the F LUT output to 0, a
// stuck-at fault used to exercise the BIST.
module plb_slice
  import bist_pkg::*;
#(
  parameter bit SLICEM = 1'b1
) (
  input  logic       clk,
  input  logic       cfg_load,
  input  slice_cfg_t cfg,
  input  slice_in_t  in,
  input  logic       use_cin,   // carry into F stage from CARRY-IN (1) or BX (0)
  input  logic       cin,
  input  logic       fault_sa0,
  output logic       x,
  output logic       y,
  output logic       xq,
  output logic       yq,
  output logic       cout
);
  slice_cfg_t  cfg_q;
  logic [15:0] f_mem, g_mem;
  logic        f, g, c0, c1, ff_en;

  assign f     = fault_sa0 ? 1'b0 : f_mem[in.f];
  assign g     = g_mem[in.g];
  assign c0    = use_cin ? cin : in.bx;
  assign c1    = f ? c0 : in.f[0];
  assign cout  = g ? c1 : in.g[0];
  assign x     = cfg_q.x_sum ? (f ^ c0) : f;
  assign y     = cfg_q.y_sum ? (g ^ c1) : g;
  assign ff_en = !cfg_q.ce_used || in.ce;

  always_ff @(posedge clk) begin
    if (cfg_load) begin
      cfg_q <= cfg;
      f_mem <= cfg.f_lut;
      g_mem <= cfg.g_lut;
      xq    <= 1'b0;
      yq    <= 1'b0;
    end else begin
      if (SLICEM && cfg_q.srl && ff_en) begin
        f_mem <= {f_mem[14:0], in.bx};
        g_mem <= {g_mem[14:0], in.by};
      end
      if (cfg_q.sr_used && in.sr) begin
        xq <= cfg_q.sr_val;
        yq <= cfg_q.sr_val;
      end else if (ff_en) begin
        xq <= x;
        yq <= y;
      end
    end
  end
endmodule
