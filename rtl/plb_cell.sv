// plb_cell: one programmable logic block (PLB) of the PLB BIST array.
//
// A PLB holds two SliceM and two SliceL slices. Depending on its test
// session role it is either a block under test (BUT) or a set of eight ORAs.
// As a BUT, all four slices receive the same twelve TPG bits and are
// configured identically; the two SliceM form one carry column (slice 0 ->
// slice 1) and the two SliceL another (slice 2 -> slice 3). The eight
// observed outputs are XQ/YQ of each slice, or X/Y when the configuration
// says so (shift-register configurations). As an ORA block, the PLB compares
// output i of the BUT on its left with output i of the BUT on its right in
// eight independent ora_cell instances.
//
// Carry chain: the bottom slice of each carry column takes CARRY-IN from the
// PLB below when (row is odd) equals cfg.carry_odd, and BX otherwise, so the
// chain never spans more than two PLBs; swapping cfg.carry_odd in a later
// configuration tests CARRY-IN on the other rows. This follows the source
// design. Holding BUT slices and ORA cells side by side, selected by is_ora,
// is this model's way of expressing that the same PLB is reconfigured into
// either role.
module plb_cell
  import bist_pkg::*;
#(
  parameter bit ROW_ODD = 1'b0
) (
  input  logic                clk,
  input  logic                is_ora,     // role in the current session
  input  logic                cfg_load,   // reconfigure the BUT slices
  input  slice_cfg_t          cfg,
  input  slice_in_t           tpg_in,     // TPG bits for the BUT role
  input  logic [1:0]          cin,        // carry in per carry column (from PLB below)
  output logic [1:0]          cout,       // carry out per carry column (to PLB above)
  input  logic                fault,      // stuck-at-0 on the F LUT of slice 0
  output logic [PLB_OUTS-1:0] obs,        // observed BUT outputs {YQ3,XQ3,...,YQ0,XQ0}
  input  logic                ora_clr,
  input  logic [PLB_OUTS-1:0] left_obs,   // outputs of the BUT on the left
  input  logic [PLB_OUTS-1:0] right_obs,  // outputs of the BUT on the right
  output logic [PLB_OUTS-1:0] ora_fail    // the eight ORA flags
);
  logic [PLB_SLICES-1:0] x, y, xq, yq, co;
  logic                  chain_cin;

  // Does the bottom slice of each carry column take CARRY-IN in this row?
  assign chain_cin = (ROW_ODD == cfg.carry_odd);

  for (genvar s = 0; s < PLB_SLICES; s++) begin : g_slice
    logic sl_cin, sl_use;
    if (s % 2 == 0) begin : g_bottom
      assign sl_cin = cin[s/2];
      assign sl_use = chain_cin;
    end else begin : g_top
      assign sl_cin = co[s-1];
      assign sl_use = 1'b1;
    end
    plb_slice #(.SLICEM(s < 2)) u_slice (
      .clk       (clk),
      .cfg_load  (cfg_load),
      .cfg       (cfg),
      .in        (tpg_in),
      .use_cin   (sl_use),
      .cin       (sl_cin),
      .fault_sa0 (fault && s == 0),
      .x         (x[s]),
      .y         (y[s]),
      .xq        (xq[s]),
      .yq        (yq[s]),
      .cout      (co[s])
    );
    assign obs[2*s]   = cfg.obs_comb ? x[s] : xq[s];
    assign obs[2*s+1] = cfg.obs_comb ? y[s] : yq[s];
  end
  assign cout = {co[3], co[1]};

  for (genvar i = 0; i < PLB_OUTS; i++) begin : g_ora
    ora_cell u_ora (
      .clk   (clk),
      .clr   (ora_clr || !is_ora),
      .left  (left_obs[i]),
      .right (right_obs[i]),
      .fail  (ora_fail[i])
    );
  end
endmodule
