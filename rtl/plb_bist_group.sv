// plb_bist_group: the PLB BIST circuit of one set of four PLB rows.
//
// Two accumulator TPGs (the two DSPs of the four rows) drive alternate BUT
// columns: BUT column b (physical column 2b+1 in session 0, 2b in session 1)
// takes TPG b mod 2. Along each row BUT and ORA PLBs alternate, and every ORA
// PLB compares the BUT to its left with the BUT to its right; the row closes
// into a ring, so every BUT is watched by two ORAs and every ORA sees one BUT
// of each TPG. A faulty BUT therefore sets the flags of the two ORAs beside
// it; a faulty TPG sets every ORA of the group. In session 1 the roles of
// the columns are swapped, so each PLB is tested once over two sessions.
//
// Loading: each TPG drives COLS/4 BUT PLBs per row over four rows, that is
// COLS PLBs or COLS x 4 slice inputs, independent of the device height. Carry
// columns run upward through the four rows; cin_bot comes from the group
// below and cout_top goes to the group above.
//
// Timing: tpg_init and cfg_load are usually pulsed together at the start of
// a BIST configuration; the BUT flip-flops register pattern n one clock after
// the TPG shows it, and the ORA flags one clock after that. The structure
// (four rows, two DSP TPGs, alternating columns, circular rows, session swap)
// follows the source design. COLS must be a multiple of 4 so that the ring
// alternates between the two TPGs.
module plb_bist_group
  import bist_pkg::*;
#(
  parameter int unsigned COLS = 28
) (
  input  logic                clk,
  input  logic                session,    // 0: even columns are ORAs, 1: odd columns
  input  logic                tpg_init,
  input  logic                cfg_load,
  input  slice_cfg_t          cfg,
  input  logic                ora_clr,
  input  logic [1:0]          cin_bot  [COLS],
  output logic [1:0]          cout_top [COLS],
  input  logic                fault    [4][COLS],
  output logic [PLB_OUTS-1:0] ora_fail [4][COLS],
  output logic [SLICE_INPUTS-1:0] tpg_pattern [2]
);
  logic [PLB_OUTS-1:0] obs   [4][COLS];

  for (genvar t = 0; t < 2; t++) begin : g_tpg
    acc_tpg u_tpg (
      .clk     (clk),
      .init    (tpg_init),
      .pattern (tpg_pattern[t]),
      .acc     ()
    );
  end

  for (genvar c = 0; c < COLS; c++) begin : g_col
    for (genvar r = 0; r < 4; r++) begin : g_row
      logic [1:0] ci, co;
      if (r == 0) begin : g_first
        assign ci = cin_bot[c];
      end else begin : g_next
        assign ci = g_row[r-1].co;
      end
      plb_cell #(.ROW_ODD(r % 2 == 1)) u_plb (
        .clk       (clk),
        .is_ora    ((c % 2 == 1) == session),
        .cfg_load  (cfg_load),
        .cfg       (cfg),
        .tpg_in    (slice_in_t'(tpg_pattern[(c / 2) % 2])),
        .cin       (ci),
        .cout      (co),
        .fault     (fault[r][c]),
        .obs       (obs[r][c]),
        .ora_clr   (ora_clr),
        .left_obs  (obs[r][(c + COLS - 1) % COLS]),
        .right_obs (obs[r][(c + 1) % COLS]),
        .ora_fail  (ora_fail[r][c])
      );
    end
    assign cout_top[c] = g_row[3].co;
  end

  initial assert (COLS % 4 == 0)
    else $error("plb_bist_group: COLS must be a multiple of 4");
endmodule
