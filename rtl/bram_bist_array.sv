// bram_bist_array: block RAM BIST with two TPGs and circular comparison.
//
// All N_BRAM block RAMs are configured identically and tested at once. Two
// march TPGs (bram_tpg) drive alternating RAMs: RAM k takes TPG k mod 2.
// Next to each RAM sits a set of 72 ORAs (nine PLBs) that compares all 36
// outputs of both ports of RAM k with those of RAM k+1; the last set closes
// the ring back to RAM 0 (the connections across the top and bottom of the
// RAM columns). Every RAM is thus compared with two other RAMs, each driven
// by the other TPG, and the ORAs watch every output bit even where the
// configured width leaves it unused.
//
// Interface: init clears the RAMs (configuration-time contents); ora_clr
// clears the ORA flags; start begins the algorithm of cfg in both TPGs; done
// is high when both have finished. fault_en[k] enables the stuck-at cell of
// RAM k. ora_fail[k] holds {port B bits, port A bits} of ORA set k.
//
// The two TPGs on alternating RAMs, the 72 ORAs per RAM and the ring follow
// the source design. The order of the ring, RAM index order here, stands for
// the column-by-column order of the floorplan. N_BRAM must be even.
module bram_bist_array
  import bist_pkg::*;
#(
  parameter int unsigned N_BRAM    = 72,
  parameter int unsigned FAULT_BIT = 1000
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 init,
  input  logic                 ora_clr,
  input  logic                 start,
  input  bram_cfg_t            cfg,
  input  logic [N_BRAM-1:0]    fault_en,
  output logic                 done,
  output logic [2*BRAM_DW-1:0] ora_fail [N_BRAM]
);
  logic               t_busy [2], t_done [2];
  logic               t_en_a [2], t_we_a [2], t_en_b [2], t_we_b [2];
  logic [BRAM_AW-1:0] t_addr_a [2], t_addr_b [2];
  logic [BRAM_DW-1:0] t_din_a [2], t_din_b [2];
  logic [2*BRAM_DW-1:0] dout [N_BRAM];

  for (genvar t = 0; t < 2; t++) begin : g_tpg
    bram_tpg u_tpg (
      .clk    (clk),
      .rst    (rst),
      .start  (start),
      .cfg    (cfg),
      .busy   (t_busy[t]),
      .done   (t_done[t]),
      .en_a   (t_en_a[t]),
      .we_a   (t_we_a[t]),
      .addr_a (t_addr_a[t]),
      .din_a  (t_din_a[t]),
      .en_b   (t_en_b[t]),
      .we_b   (t_we_b[t]),
      .addr_b (t_addr_b[t]),
      .din_b  (t_din_b[t])
    );
  end
  assign done = t_done[0] && t_done[1];

  for (genvar k = 0; k < N_BRAM; k++) begin : g_ram
    localparam int T = k % 2;
    bram_model #(.FAULT_BIT(FAULT_BIT)) u_ram (
      .clk      (clk),
      .init     (init),
      .width    (cfg.width),
      .fault_en (fault_en[k]),
      .en_a     (t_en_a[T]),
      .we_a     (t_we_a[T]),
      .addr_a   (t_addr_a[T]),
      .din_a    (t_din_a[T]),
      .dout_a   (dout[k][BRAM_DW-1:0]),
      .en_b     (t_en_b[T]),
      .we_b     (t_we_b[T]),
      .addr_b   (t_addr_b[T]),
      .din_b    (t_din_b[T]),
      .dout_b   (dout[k][2*BRAM_DW-1:BRAM_DW])
    );
    for (genvar i = 0; i < 2 * BRAM_DW; i++) begin : g_ora
      ora_cell u_ora (
        .clk   (clk),
        .clr   (ora_clr),
        .left  (dout[k][i]),
        .right (dout[(k + 1) % N_BRAM][i]),
        .fail  (ora_fail[k][i])
      );
    end
  end

  initial assert (N_BRAM % 2 == 0)
    else $error("bram_bist_array: N_BRAM must be even");
endmodule
