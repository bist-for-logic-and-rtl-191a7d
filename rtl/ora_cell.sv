// ora_cell: one comparison-based output response analyzer (ORA).
//
// The ORA compares the same output of the two blocks under test (BUTs) on
// either side of it. The LUT computes (left xor right) or fail, and the
// flip-flop stores it, so a single mismatch sets the pass/fail flag and it
// stays set until the ORA is cleared. Two of these fit in one slice (the G
// and F LUT with their flip-flops), eight in a PLB. The flag is read through
// configuration readback, so no scan path is built.
//
// Timing: the flag reflects a mismatch on the inputs one clock after it is
// present. clr is synchronous and has priority; it stands for the flip-flop
// initialisation of a full configuration. Partial reconfigurations of the
// BUTs do not clear it, so failures accumulate over a whole test session.
// The structure (XOR, OR with the fed-back flag, flip-flop) follows the
// source design; the clear input is this model's way of modelling the
// configuration-time initial value.
module ora_cell (
  input  logic clk,
  input  logic clr,    // synchronous clear (full configuration)
  input  logic left,   // output i of the BUT on the left
  input  logic right,  // output i of the BUT on the right
  output logic fail    // pass (0) / fail (1) flag
);
  always_ff @(posedge clk) begin
    if (clr) fail <= 1'b0;
    else     fail <= (left ^ right) | fail;
  end
endmodule
