// lutram_bist_group: LUT RAM BIST circuit of one set of four PLB rows.
//
// Two TPGs (each a DSP counter addressing a block RAM of test vectors)
// supply alternating PLB columns: the LUT RAMs in column c take TPG c mod 2.
// In every PLB the two SliceM are the LUT RAM under test and the two SliceL
// hold four ORAs. The ORAs of PLB c compare the four outputs of LUT RAM c
// with those of LUT RAM c+1, and each row closes into a ring, so every LUT
// RAM is compared with both neighbours, each driven by the other TPG.
//
// Interface: ora_clr clears the flags and init the LUT RAM contents (both
// done by a full configuration); start begins the
// test of mode in both TPGs; done when both are finished. ora_fail[r][c] are
// the four ORA flags of PLB (r, c), fault[r][c] injects a stuck-at-0 bit in
// that PLB's LUT RAM. TPGs, alternating columns, SliceM BUTs with SliceL
// ORAs and circular comparison follow the source design; the ring order
// within a row is this model's reading of the figure. COLS must be even.
module lutram_bist_group
  import bist_pkg::*;
#(
  parameter int unsigned COLS = 28
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         ora_clr,
  input  logic         init,
  input  logic         start,
  input  lutram_mode_e mode,
  input  logic         fault    [4][COLS],
  output logic         done,
  output logic [3:0]   ora_fail [4][COLS]
);
  lutram_vec_t vec [2];
  logic        t_busy [2], t_done [2];
  logic [3:0]  out [4][COLS];

  for (genvar t = 0; t < 2; t++) begin : g_tpg
    lutram_tpg u_tpg (
      .clk   (clk),
      .rst   (rst),
      .start (start),
      .mode  (mode),
      .vec   (vec[t]),
      .busy  (t_busy[t]),
      .done  (t_done[t])
    );
  end
  assign done = t_done[0] && t_done[1] && !t_busy[0] && !t_busy[1];

  for (genvar r = 0; r < 4; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      lutram_but u_but (
        .clk      (clk),
        .init     (init),
        .mode     (mode),
        .vec      (vec[c % 2]),
        .fault_en (fault[r][c]),
        .out      (out[r][c])
      );
      for (genvar i = 0; i < 4; i++) begin : g_ora
        ora_cell u_ora (
          .clk   (clk),
          .clr   (ora_clr),
          .left  (out[r][c][i]),
          .right (out[r][(c + 1) % COLS][i]),
          .fail  (ora_fail[r][c][i])
        );
      end
    end
  end

  initial assert (COLS % 2 == 0)
    else $error("lutram_bist_group: COLS must be even");
endmodule
