// lutram_tpg: test pattern generator of the LUT RAM BIST.
//
// A DSP used as a counter addresses a block RAM in its 1K x 18 mode that
// serves as a ROM of test vectors (lutram_vec_t: write enable, data, write
// address, dual-port read address). The ROM contents for the configured RAM
// mode are given by lutram_vec() in bist_pkg, which stands for the vectors
// loaded into the block RAM with each partial reconfiguration. After start,
// the counter steps through lutram_len(mode) addresses, one per clock, and
// the block RAM presents each vector one clock after its address (synchronous
// read). done rises one clock after the last vector and stays high until the
// next start; vec is all zero (no write) outside a run.
//
// Vectors: March Y on all three modes, 8n vectors for n words (512 for
// 64x1, 256 for 32x1, as in the source design). For the 16x2 dual-port
// configuration the source uses its March DPR test of 624 vectors, whose
// elements it does not give; this model applies March Y there (128 vectors)
// with the second read port following the addressed word.
module lutram_tpg
  import bist_pkg::*;
(
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  lutram_mode_e mode,
  output lutram_vec_t  vec,
  output logic         busy,
  output logic         done
);
  logic [9:0] cnt;      // DSP counter, drives the block RAM address
  logic       run, rd_valid;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt      <= '0;
      run      <= 1'b0;
      rd_valid <= 1'b0;
      done     <= 1'b0;
      vec      <= '0;
    end else begin
      rd_valid <= run;
      vec      <= run ? lutram_vec(mode, 32'(cnt)) : '0;   // block RAM read
      if (start && !run) begin
        run  <= 1'b1;
        cnt  <= '0;
        done <= 1'b0;
      end else if (run) begin
        if (32'(cnt) == lutram_len(mode) - 1) run <= 1'b0;
        else cnt <= cnt + 1'b1;
      end
      if (rd_valid && !run) done <= 1'b1;
    end
  end
  assign busy = run || rd_valid;
endmodule
