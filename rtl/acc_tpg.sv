// acc_tpg: accumulator-based test pattern generator (a DSP48 slice in
// accumulator mode).
//
// A 48-bit accumulator is cleared to zero and adds the constant 0x691 on
// every clock. Only its twelve least significant bits leave the TPG, one for
// each input of a slice. Since 0x691 is odd, the twelve low bits step through
// all 4,096 values in 4,096 clocks, with more transitions per bit than a
// binary counter gives.
//
// Interface: init clears the accumulator (synchronous, priority); pattern is
// the low 12 bits of the accumulator register, so the first pattern after
// init is 0 and pattern n is (n * 0x691) mod 4096. The increment, width and
// clear-to-zero follow the source design; the synchronous init input is this
// model's choice.
module acc_tpg
  import bist_pkg::*;
#(
  parameter logic [ACC_WIDTH-1:0] INC = ACC_INC
) (
  input  logic                    clk,
  input  logic                    init,
  output logic [SLICE_INPUTS-1:0] pattern,
  output logic [ACC_WIDTH-1:0]    acc
);
  always_ff @(posedge clk) begin
    if (init) acc <= '0;
    else      acc <= acc + INC;
  end
  assign pattern = acc[SLICE_INPUTS-1:0];
endmodule
