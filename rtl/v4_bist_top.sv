// v4_bist_top: BIST of the logic and block RAM resources of one FPGA array.
//
// PLB BIST: the ROWS x COLS PLB array is split into ROWS/4 independent
// four-row groups (plb_bist_group), each with its own pair of accumulator
// TPGs, so TPG loading depends on the column count only. All groups share one
// session sequencer (bist_session_ctrl), which steps the BUTs through the
// twelve configurations of plb_cfg() while the ORA flags accumulate; the
// flags are then read frame by frame through frame_readback (ROWS x COLS / 32
// frames of 128 bits). session selects which PLB columns are BUTs. Carry
// columns continue from one group into the next; the bottom row sees 0.
//
// LUT RAM BIST: one lutram_bist_group per four PLB rows, each with its own
// pair of counter/ROM TPGs, tests the SliceM LUT RAMs of every PLB in the
// mode lut_mode (64x1, 32x1 or 16x2 dual-port); lut_init and lut_ora_clr
// stand for the full configuration, lut_ora_fail holds the four ORA flags of
// each PLB.
//
// Block RAM BIST: bram_bist_array tests all N_BRAM block RAMs with two march
// TPGs and a ring of ORAs. bram_cfg_sel picks configuration 0 (March LR with
// backgrounds, 512x36), 1 (MATS+, 8Kx2) or 2 (MATS+, 16Kx1); bram_init
// models the configuration-time RAM contents and bram_ora_clr the ORA
// initialisation of a full configuration.
//
// The three BIST structures are separate test configurations of the device
// and run independently. The defaults, a 96 x 28 PLB array with 72 block
// RAMs, are the size of the smallest device on which the source reports
// running the BIST (an LX25); those numbers are not stated in the source.
// fault_plb, fault_lut and bram_fault_en inject stuck-at faults into chosen BUTs for
// simulation.
module v4_bist_top
  import bist_pkg::*;
#(
  parameter int unsigned ROWS   = 96,
  parameter int unsigned COLS   = 28,
  parameter int unsigned N_BRAM = 72,
  localparam int unsigned N_FRAME = ROWS * COLS / 32,
  localparam int unsigned FAW = (N_FRAME > 1) ? $clog2(N_FRAME) : 1
) (
  input  logic                  clk,
  input  logic                  rst,
  // PLB BIST
  input  logic                  session,
  input  logic                  plb_start,
  output logic                  plb_running,
  output logic                  plb_done,
  output logic [3:0]            plb_cfg_idx,   // configuration being applied
  input  logic                  fault_plb [ROWS][COLS],
  input  logic                  frame_rd,
  input  logic [FAW-1:0]        frame_addr,
  output logic [FRAME_BITS-1:0] frame_data,
  output logic                  frame_valid,
  // LUT RAM BIST
  input  logic                  lut_init,
  input  logic                  lut_ora_clr,
  input  logic                  lut_start,
  input  lutram_mode_e          lut_mode,
  input  logic                  fault_lut [ROWS][COLS],
  output logic                  lut_done,
  output logic [3:0]            lut_ora_fail [ROWS][COLS],
  // block RAM BIST
  input  logic                  bram_init,
  input  logic                  bram_ora_clr,
  input  logic                  bram_start,
  input  logic [1:0]            bram_cfg_sel,
  input  logic [N_BRAM-1:0]     bram_fault_en,
  output logic                  bram_done,
  output logic [2*BRAM_DW-1:0]  bram_ora_fail [N_BRAM]
);
  localparam int unsigned NG = ROWS / 4;

  logic                ora_clr, cfg_load, tpg_init;
  logic [3:0]          cfg_idx;
  slice_cfg_t          cfg;
  logic [PLB_OUTS-1:0] ora_fail [ROWS][COLS];

  bist_session_ctrl #(.N_CFG(N_PLB_CFG), .PATTERNS(1 << SLICE_INPUTS)) u_ctrl (
    .clk      (clk),
    .rst      (rst),
    .start    (plb_start),
    .ora_clr  (ora_clr),
    .cfg_load (cfg_load),
    .tpg_init (tpg_init),
    .cfg_idx  (cfg_idx),
    .running  (plb_running),
    .done     (plb_done)
  );
  assign cfg = plb_cfg(32'(cfg_idx));
  assign plb_cfg_idx = cfg_idx;

  for (genvar g = 0; g < NG; g++) begin : g_grp
    logic                fault_g [4][COLS];
    logic [PLB_OUTS-1:0] fail_g  [4][COLS];
    logic [1:0]          cin_g   [COLS];
    logic [1:0]          cout_g  [COLS];
    for (genvar c = 0; c < COLS; c++) begin : g_c
      if (g == 0) begin : g_bottom
        assign cin_g[c] = 2'b00;
      end else begin : g_above
        assign cin_g[c] = g_grp[g-1].cout_g[c];
      end
    end
    for (genvar r = 0; r < 4; r++) begin : g_r
      assign fault_g[r]        = fault_plb[4*g + r];
      assign ora_fail[4*g + r] = fail_g[r];
    end
    plb_bist_group #(.COLS(COLS)) u_grp (
      .clk         (clk),
      .session     (session),
      .tpg_init    (tpg_init),
      .cfg_load    (cfg_load),
      .cfg         (cfg),
      .ora_clr     (ora_clr),
      .cin_bot     (cin_g),
      .cout_top    (cout_g),
      .fault       (fault_g),
      .ora_fail    (fail_g),
      .tpg_pattern ()
    );
  end

  logic [NG-1:0] lut_done_g;
  for (genvar g = 0; g < NG; g++) begin : g_lut
    logic       fault_g [4][COLS];
    logic [3:0] fail_g  [4][COLS];
    for (genvar r = 0; r < 4; r++) begin : g_r
      assign fault_g[r]            = fault_lut[4*g + r];
      assign lut_ora_fail[4*g + r] = fail_g[r];
    end
    lutram_bist_group #(.COLS(COLS)) u_lgrp (
      .clk      (clk),
      .rst      (rst),
      .ora_clr  (lut_ora_clr),
      .init     (lut_init),
      .start    (lut_start),
      .mode     (lut_mode),
      .fault    (fault_g),
      .done     (lut_done_g[g]),
      .ora_fail (fail_g)
    );
  end
  assign lut_done = &lut_done_g;

  frame_readback #(.ROWS(ROWS), .COLS(COLS)) u_rb (
    .clk         (clk),
    .session     (session),
    .ora_fail    (ora_fail),
    .rd          (frame_rd),
    .frame_addr  (frame_addr),
    .frame_data  (frame_data),
    .frame_valid (frame_valid)
  );

  bram_bist_array #(.N_BRAM(N_BRAM)) u_bram (
    .clk      (clk),
    .rst      (rst),
    .init     (bram_init),
    .ora_clr  (bram_ora_clr),
    .start    (bram_start),
    .cfg      (bram_cfg(32'(bram_cfg_sel))),
    .fault_en (bram_fault_en),
    .done     (bram_done),
    .ora_fail (bram_ora_fail)
  );

  initial assert (ROWS % 16 == 0)
    else $error("v4_bist_top: ROWS must be a multiple of 16");
endmodule
