// frame_readback: partial configuration memory readback of the ORA flags.
//
// In the device a configuration frame covers one column of 16 PLBs and holds
// all 128 flip-flops of those PLBs, so the ORA results of a 16-PLB ORA column
// are read with one frame. Only the ORA columns are read: ROWS/16 x COLS/2
// frames in all (ROWS x COLS / 32). Frame f covers row block f / (COLS/2) and
// ORA column j = f mod (COLS/2), which is physical column 2j + session. Bit
// 8k+i of the frame is ORA flag i of the PLB in row 16*block + k.
//
// Timing: frame_data holds the frame addressed in the cycle rd was high, one
// clock later, with frame_valid. The frame size, its contents and the frame
// count follow the source design; the frame numbering and the one-cycle read
// port are this model's own, not the device's frame address format.
module frame_readback
  import bist_pkg::*;
#(
  parameter int unsigned ROWS = 96,
  parameter int unsigned COLS = 28,
  localparam int unsigned N_FRAME = ROWS * COLS / 32,
  localparam int unsigned FAW = (N_FRAME > 1) ? $clog2(N_FRAME) : 1
) (
  input  logic                  clk,
  input  logic                  session,
  input  logic [PLB_OUTS-1:0]   ora_fail [ROWS][COLS],
  input  logic                  rd,
  input  logic [FAW-1:0]        frame_addr,
  output logic [FRAME_BITS-1:0] frame_data,
  output logic                  frame_valid
);
  logic [FRAME_BITS-1:0] frame;
  int unsigned blk, col;

  always_comb begin
    blk = 32'(frame_addr) / (COLS / 2);
    col = 2 * (32'(frame_addr) % (COLS / 2)) + 32'(session);
    frame = '0;
    for (int k = 0; k < FRAME_PLBS; k++)
      if (blk < ROWS / FRAME_PLBS && col < COLS)
        frame[k*PLB_OUTS +: PLB_OUTS] = ora_fail[blk*FRAME_PLBS + k][col];
  end

  always_ff @(posedge clk) begin
    frame_valid <= rd;
    if (rd) frame_data <= frame;
  end

  initial assert (ROWS % FRAME_PLBS == 0 && COLS % 2 == 0)
    else $error("frame_readback: ROWS must be a multiple of 16 and COLS even");
endmodule
