// tb_frame_readback: fills the ORA flags of a 32 x 8 array with random
// values and reads every frame in both sessions, checking each 128-bit frame
// against the flags of the 16 PLBs of its ORA column, and the frame count.
module tb_frame_readback;
  localparam int ROWS = 32, COLS = 8, NF = ROWS * COLS / 32;
  logic clk = 1'b0, session, rd, frame_valid;
  logic [7:0]   ora_fail [ROWS][COLS];
  logic [$clog2(NF)-1:0] frame_addr;
  logic [127:0] frame_data;
  int checks = 0, failures = 0;

  frame_readback #(.ROWS(ROWS), .COLS(COLS)) dut (.clk, .session, .ora_fail, .rd,
    .frame_addr, .frame_data, .frame_valid);

  always #5 clk = ~clk;

  initial begin
    #100000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    checks++;
    if (NF != 8) failures++;   // (32/16) x (8/2) frames
    for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++) ora_fail[r][c] = 8'($urandom);
    rd = 1'b0; frame_addr = '0;
    for (int s = 0; s < 2; s++) begin
      session = 1'(s);
      for (int f = 0; f < NF; f++) begin
        logic [127:0] exp;
        int blk, col;
        blk = f / (COLS / 2);
        col = 2 * (f % (COLS / 2)) + s;
        for (int k = 0; k < 16; k++) exp[8*k +: 8] = ora_fail[16*blk + k][col];
        rd = 1'b1; frame_addr = $bits(frame_addr)'(f);
        @(posedge clk); #1;
        rd = 1'b0;
        checks++;
        if (!frame_valid || frame_data != exp) begin
          failures++;
          $display("frame %0d session %0d: %h expected %h", f, s, frame_data, exp);
        end
        @(posedge clk); #1;
        checks++;
        if (frame_valid) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
