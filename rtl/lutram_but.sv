// lutram_but: the LUT RAMs of one PLB as block under test of the LUT RAM
// BIST.
//
// The two SliceM of a PLB hold four 16-bit LUTs, 64 bits in all, which the
// BIST configures in one of three RAM modes:
//   LR_64X1_SP  one 64x1 single-port RAM (address wa[5:0]); out[0] = data.
//   LR_32X1_SP  one 32x1 single-port RAM per SliceM, both driven with the
//               same address wa[4:0] and data; out[1:0] = their outputs.
//   LR_16X2_DP  a 16x2 dual-port RAM: writes and the first read port use
//               wa[3:0], the second read port ra[3:0]; out[1:0] is the
//               first port, out[3:2] the second.
// Writes are synchronous (we, d); reads are asynchronous, as in a LUT.
// Unused output bits are 0. fault_en makes storage bit FAULT_BIT read 0.
// init clears all 64 bits, standing for the LUT contents set by the
// configuration; identical contents keep the neighbouring RAMs' outputs
// equal while the first march element is still writing.
//
// The three modes, and the PLB's two SliceM as the unit under test, follow
// the source design. The bit layout of the 64 bits in each mode and the
// synchronous init are this model's own.
module lutram_but
  import bist_pkg::*;
#(
  parameter int unsigned FAULT_BIT = 5
) (
  input  logic         clk,
  input  logic         init,
  input  lutram_mode_e mode,
  input  lutram_vec_t  vec,
  input  logic         fault_en,
  output logic [3:0]   out
);
  logic [63:0] mem;
  logic [63:0] rd;

  assign rd = fault_en ? (mem & ~(64'd1 << FAULT_BIT)) : mem;

  always_ff @(posedge clk) begin
    if (init) mem <= '0;
    else if (vec.we) begin
      unique case (mode)
        LR_64X1_SP: mem[vec.wa] <= vec.d[0];
        LR_32X1_SP: begin
          mem[{1'b0, vec.wa[4:0]}] <= vec.d[0];
          mem[{1'b1, vec.wa[4:0]}] <= vec.d[0];
        end
        default: begin
          mem[{2'b00, vec.wa[3:0]}] <= vec.d[0];
          mem[{2'b01, vec.wa[3:0]}] <= vec.d[1];
        end
      endcase
    end
  end

  always_comb begin
    out = '0;
    unique case (mode)
      LR_64X1_SP: out[0] = rd[vec.wa];
      LR_32X1_SP: out[1:0] = {rd[{1'b1, vec.wa[4:0]}], rd[{1'b0, vec.wa[4:0]}]};
      default:    out = {rd[{2'b01, vec.ra}], rd[{2'b00, vec.ra}],
                         rd[{2'b01, vec.wa[3:0]}], rd[{2'b00, vec.wa[3:0]}]};
    endcase
  end
endmodule
