// bist_pkg: types and constants shared by the Virtex-4 BIST model.
//
// Holds the slice configuration record that the PLB blocks under test (BUTs)
// are programmed with, the set of twelve PLB BIST configurations of one test
// session, the accumulator TPG constants, and the march-test element tables
// used by the block RAM and LUT RAM test pattern generators.
//
// From the source design: 12 slice inputs, a 48-bit accumulator that adds
// 0x691 per clock, 4,096 patterns per configuration, 12 configurations per
// session (the last two in shift-register mode with the X/Y outputs
// observed), the alternating BX / CARRY-IN selection on the carry chain, the
// 128 ORA flip-flops per 16-PLB frame, and the list of block RAM
// configurations (Table of RAM modes). The contents of each of the twelve
// configurations (LUT truth tables, which control options are exercised) are
// this model's own choice; the source does not list them.
package bist_pkg;

  localparam int unsigned SLICE_INPUTS = 12;      // inputs per slice driven by a TPG
  localparam int unsigned ACC_WIDTH    = 48;      // DSP accumulator width
  localparam logic [47:0] ACC_INC      = 48'h691; // constant added per clock
  localparam int unsigned PLB_SLICES   = 4;       // slices per PLB
  localparam int unsigned PLB_OUTS     = 8;       // observed outputs per PLB (2 per slice)
  localparam int unsigned N_PLB_CFG    = 12;      // BIST configurations per test session
  localparam int unsigned FRAME_PLBS   = 16;      // PLBs per configuration frame
  localparam int unsigned FRAME_BITS   = FRAME_PLBS * PLB_OUTS; // 128 flip-flops

  // TPG bits as they land on one slice.
  typedef struct packed {
    logic [3:0] g;   // G1..G4
    logic [3:0] f;   // F1..F4
    logic       by;
    logic       bx;
    logic       ce;
    logic       sr;
  } slice_in_t;

  // Configuration of one slice (what a partial reconfiguration rewrites).
  typedef struct packed {
    logic [15:0] f_lut;     // F LUT truth table, index = F4..F1
    logic [15:0] g_lut;     // G LUT truth table, index = G4..G1
    logic        carry_odd; // 1: odd rows take CARRY-IN, even rows BX; 0: swapped
    logic        x_sum;     // X = F LUT xor carry (sum) instead of F LUT
    logic        y_sum;     // Y = G LUT xor carry
    logic        ce_used;   // flip-flops honour the CE input
    logic        sr_used;   // flip-flops honour the SR input (synchronous)
    logic        sr_val;    // value loaded by SR
    logic        srl;       // SliceM LUTs work as 16-bit shift registers
    logic        obs_comb;  // ORAs observe X/Y instead of XQ/YQ
  } slice_cfg_t;

  // The twelve PLB BIST configurations of a test session.
  function automatic slice_cfg_t plb_cfg(input int unsigned k);
    slice_cfg_t c;
    c = '0;
    case (k)
      0:  begin c.f_lut = 16'h6996; c.g_lut = 16'h9669; end               // XOR4 / XNOR4
      1:  begin c.f_lut = 16'h8000; c.g_lut = 16'hFFFE; end               // AND4 / OR4
      2:  begin c.f_lut = 16'h7FFF; c.g_lut = 16'h0001; end               // NAND4 / NOR4
      3:  begin c.f_lut = 16'hAAAA; c.g_lut = 16'hCCCC; c.x_sum = 1'b1; c.y_sum = 1'b1; c.carry_odd = 1'b1; end
      4:  begin c.f_lut = 16'hAAAA; c.g_lut = 16'hCCCC; c.x_sum = 1'b1; c.y_sum = 1'b1; c.carry_odd = 1'b0; end
      5:  begin c.f_lut = 16'h5555; c.g_lut = 16'h3333; c.x_sum = 1'b1; c.y_sum = 1'b1; c.carry_odd = 1'b1; end
      6:  begin c.f_lut = 16'h5555; c.g_lut = 16'h3333; c.x_sum = 1'b1; c.y_sum = 1'b1; c.carry_odd = 1'b0; end
      7:  begin c.f_lut = 16'h6996; c.g_lut = 16'h6996; c.ce_used = 1'b1; end
      8:  begin c.f_lut = 16'h9669; c.g_lut = 16'h9669; c.sr_used = 1'b1; c.sr_val = 1'b0; end
      9:  begin c.f_lut = 16'h6996; c.g_lut = 16'h9669; c.sr_used = 1'b1; c.sr_val = 1'b1; c.ce_used = 1'b1; end
      10: begin c.f_lut = 16'h0000; c.g_lut = 16'hFFFF; c.srl = 1'b1; c.obs_comb = 1'b1; end
      default: begin c.f_lut = 16'hFFFF; c.g_lut = 16'h0000; c.srl = 1'b1; c.obs_comb = 1'b1; end
    endcase
    return c;
  endfunction

  // ---------------------------------------------------------------- block RAM
  typedef enum logic [1:0] {ALG_MARCH_LR_BDS, ALG_MATS_PLUS} ram_alg_e;

  // Data widths of the block RAM aspect ratios.
  localparam int unsigned BRAM_BITS = 18432;

  // One block RAM BIST configuration (rows 1-3 of the RAM configuration table).
  typedef struct packed {
    ram_alg_e    alg;
    logic [5:0]  width;    // data bits per word: 1, 2, 4, 9, 18 or 36
    logic [14:0] depth;    // address locations
  } bram_cfg_t;

  function automatic bram_cfg_t bram_cfg(input int unsigned k);
    bram_cfg_t c;
    case (k)
      0:       c = '{alg: ALG_MARCH_LR_BDS, width: 6'd36, depth: 15'd512};
      1:       c = '{alg: ALG_MATS_PLUS,    width: 6'd2,  depth: 15'd8192};
      default: c = '{alg: ALG_MATS_PLUS,    width: 6'd1,  depth: 15'd16384};
    endcase
    return c;
  endfunction

  // Address width of a block RAM port (16K x 1 needs 14 bits).
  localparam int unsigned BRAM_AW = 14;
  localparam int unsigned BRAM_DW = 36;

  // March LR has 14 operations per address; each additional data background
  // of the BDS extension adds 4 (write b, read b, write ~b, read ~b).
  localparam int unsigned N_BDS = 6;  // backgrounds beyond the solid one for 36-bit words

  // Data background k (k = 1..N_BDS) for 36-bit words: bit i = bit (k-1) of i.
  function automatic logic [35:0] bds_background(input int unsigned k);
    logic [35:0] b;
    for (int i = 0; i < 36; i++) b[i] = 1'((i >> (k - 1)) & 1);
    return b;
  endfunction

  // ---------------------------------------------------------------- LUT RAM
  typedef enum logic [1:0] {LR_64X1_SP, LR_32X1_SP, LR_16X2_DP} lutram_mode_e;

  // One LUT RAM test vector as stored in the TPG block RAM (1K x 18).
  typedef struct packed {
    logic [4:0] unused;
    logic [3:0] ra;    // dual-port read address
    logic [5:0] wa;    // write / single-port address
    logic [1:0] d;     // write data
    logic       we;    // write enable
  } lutram_vec_t;

  // Number of test vectors of a LUT RAM BIST configuration.
  function automatic int unsigned lutram_len(input lutram_mode_e m);
    case (m)
      LR_64X1_SP: return 8 * 64;
      LR_32X1_SP: return 8 * 32;
      default:    return 8 * 16;
    endcase
  endfunction

  // March Y, {any(w0); up(r0,w1,r1); dn(r1,w0,r0); any(r0)}, on n words:
  // vector p of 8n. Data 1 is all ones of the word; for the dual-port mode
  // each read also sets the dual-port read address to the addressed word.
  function automatic lutram_vec_t lutram_vec(input lutram_mode_e m, input int unsigned p);
    lutram_vec_t v;
    int unsigned n, q, a, op;
    logic        val;
    n = lutram_len(m) / 8;
    v = '0;
    if (p < n) begin
      a = p; v.we = 1'b1; val = 1'b0;
    end else if (p < 4 * n) begin
      q = p - n; a = q / 3; op = q % 3;
      v.we = (op == 1); val = (op != 0);
    end else if (p < 7 * n) begin
      q = p - 4 * n; a = n - 1 - q / 3; op = q % 3;
      v.we = (op == 1); val = (op == 0);
    end else begin
      a = p - 7 * n; v.we = 1'b0; val = 1'b0;
    end
    v.wa = 6'(a);
    v.ra = 4'(a);
    v.d  = {val, val};
    return v;
  endfunction

endpackage
