// bram_tpg: march-test pattern generator for the block RAM BIST.
//
// A small state machine walks a table of march elements. Each element has an
// address order (up or down) and up to four operations; each operation is a
// read or a write of the data background or its inverse. One operation is
// issued per clock, to one RAM port, for every address of the configured
// depth. Read data is not checked here: the ORAs compare the outputs of
// neighbouring RAMs (circular comparison).
//
// Algorithms (alg of cfg):
//   MARCH_LR_BDS  March LR, 14 operations per address:
//                   {any(w0); dn(r0,w1); up(r1,w0,r0,w1); up(r1,w0);
//                    up(r0,w1,r1,w0); up(r0)}
//                 followed by N_BDS background elements up(wb,rb,w~b,r~b)
//                 with the backgrounds of bds_background(); 38 x depth clocks.
//   MATS_PLUS     {any(w0); up(r0,w1); dn(r1,w0)}, run once on port A and
//                 once on port B: 2 x 5 x depth clocks.
//
// Interface: start (one-cycle pulse, in idle) latches cfg and begins; busy is
// high while operations are issued; done rises the clock after the last
// operation and stays high until the next start. Port outputs are
// combinational from the state registers and meet the RAM at the next edge.
//
// The algorithm names, the per-port repetition of MATS+ (2 x 5 x A) and the
// use of a state machine follow the source design. The BDS element form, and
// hence its 38 x A length where the source lists 58 x A, is this model's
// own, as is the element encoding. March s2pf- and March d2pf are not built.
module bram_tpg
  import bist_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  logic               start,
  input  bram_cfg_t          cfg,
  output logic               busy,
  output logic               done,
  output logic               en_a,
  output logic               we_a,
  output logic [BRAM_AW-1:0] addr_a,
  output logic [BRAM_DW-1:0] din_a,
  output logic               en_b,
  output logic               we_b,
  output logic [BRAM_AW-1:0] addr_b,
  output logic [BRAM_DW-1:0] din_b
);
  typedef struct packed {
    logic       w;    // write (1) or read (0)
    logic       inv;  // inverse of the background
  } op_t;

  typedef struct packed {
    logic       down;
    logic [2:0] nops;
    op_t [3:0]  ops;  // ops[0] first
  } elem_t;

  localparam op_t W0 = '{w: 1'b1, inv: 1'b0};
  localparam op_t W1 = '{w: 1'b1, inv: 1'b1};
  localparam op_t R0 = '{w: 1'b0, inv: 1'b0};
  localparam op_t R1 = '{w: 1'b0, inv: 1'b1};

  function automatic elem_t element(input ram_alg_e alg, input logic [3:0] e);
    elem_t el;
    el = '0;
    if (alg == ALG_MATS_PLUS) begin
      case (e)
        4'd0:    el = '{down: 1'b0, nops: 3'd1, ops: {R0, R0, R0, W0}};
        4'd1:    el = '{down: 1'b0, nops: 3'd2, ops: {R0, R0, W1, R0}};
        default: el = '{down: 1'b1, nops: 3'd2, ops: {R0, R0, W0, R1}};
      endcase
    end else begin
      case (e)
        4'd0:    el = '{down: 1'b0, nops: 3'd1, ops: {R0, R0, R0, W0}};
        4'd1:    el = '{down: 1'b1, nops: 3'd2, ops: {R0, R0, W1, R0}};
        4'd2:    el = '{down: 1'b0, nops: 3'd4, ops: {W1, R0, W0, R1}};
        4'd3:    el = '{down: 1'b0, nops: 3'd2, ops: {R0, R0, W0, R1}};
        4'd4:    el = '{down: 1'b0, nops: 3'd4, ops: {W0, R1, W1, R0}};
        4'd5:    el = '{down: 1'b0, nops: 3'd1, ops: {R0, R0, R0, R0}};
        default: el = '{down: 1'b0, nops: 3'd4, ops: {R1, W1, R0, W0}};
      endcase
    end
    return el;
  endfunction

  function automatic logic [3:0] n_elems(input ram_alg_e alg);
    return (alg == ALG_MATS_PLUS) ? 4'd3 : 4'(6 + N_BDS);
  endfunction

  typedef enum logic [1:0] {T_IDLE, T_RUN, T_DONE} tstate_e;
  tstate_e            state;
  bram_cfg_t          cfg_q;
  logic               pass;    // port B pass of MATS+
  logic [3:0]         e;
  logic [1:0]         op;
  logic [BRAM_AW:0]   idx;
  elem_t              el;
  op_t                cur;
  logic [BRAM_DW-1:0] bg, mask, data;
  logic [BRAM_AW-1:0] addr;
  logic               last_addr, last_op, last_elem;

  always_comb begin
    el        = element(cfg_q.alg, e);
    cur       = el.ops[op];
    bg        = (cfg_q.alg == ALG_MARCH_LR_BDS && e >= 4'd6) ? bds_background(32'(e) - 5) : '0;
    mask      = (BRAM_DW'(1) << cfg_q.width) - 1'b1;
    data      = (cur.inv ? ~bg : bg) & mask;
    addr      = el.down ? BRAM_AW'(32'(cfg_q.depth) - 1 - 32'(idx)) : BRAM_AW'(idx);
    last_op   = (op == 2'(el.nops - 1'b1));
    last_addr = (32'(idx) == 32'(cfg_q.depth) - 1);
    last_elem = (e == n_elems(cfg_q.alg) - 1'b1);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= T_IDLE;
      done  <= 1'b0;
      cfg_q <= '0;
      pass  <= 1'b0;
      e     <= '0;
      op    <= '0;
      idx   <= '0;
    end else begin
      unique case (state)
        T_IDLE, T_DONE: if (start) begin
          state <= T_RUN;
          done  <= 1'b0;
          cfg_q <= cfg;
          pass  <= 1'b0;
          e     <= '0;
          op    <= '0;
          idx   <= '0;
        end
        T_RUN: begin
          if (!last_op) op <= op + 1'b1;
          else begin
            op <= '0;
            if (!last_addr) idx <= idx + 1'b1;
            else begin
              idx <= '0;
              if (!last_elem) e <= e + 1'b1;
              else begin
                e <= '0;
                if (cfg_q.alg == ALG_MATS_PLUS && !pass) pass <= 1'b1;
                else begin
                  state <= T_DONE;
                  done  <= 1'b1;
                end
              end
            end
          end
        end
        default: state <= T_IDLE;
      endcase
    end
  end

  assign busy   = (state == T_RUN);
  assign en_a   = busy && !pass;
  assign we_a   = en_a && cur.w;
  assign addr_a = addr;
  assign din_a  = data;
  assign en_b   = busy && pass;
  assign we_b   = en_b && cur.w;
  assign addr_b = addr;
  assign din_b  = data;
endmodule
