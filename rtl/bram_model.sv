// bram_model: RTL model of an 18K-bit dual-port block RAM, the block under
// test of the block RAM BIST.
//
// The 18,432 storage bits (16K data bits plus 2K parity bits) are addressed
// as one bit array: word a of a WIDTH-bit aspect ratio occupies bits
// a*WIDTH .. a*WIDTH+WIDTH-1, which gives 16Kx1, 8Kx2, 4Kx4, 2Kx9, 1Kx18 and
// 512x36 (the 9/18/36-bit ratios include the parity bits). Each of ports A
// and B has enable, write enable, address and data; reads and writes are
// synchronous, and a read returns the data held before a write in the same
// cycle (read-first). Output bits at and above the configured width read 0,
// so inactive outputs match between identically configured RAMs.
//
// init clears the array and both outputs in one cycle, standing for the
// initial contents written at configuration. fault_en makes the cell
// FAULT_BIT read as 0 (a stuck-at-0 cell) for exercising the BIST. If both
// ports write the same bit in one cycle, port B wins.
//
// From the source design: 18K bits, dual port, the aspect ratios of the
// RAM configuration table. The bit mapping, read-first behaviour, the
// clear-on-init and the collision rule are this model's own. FIFO, ECC,
// byte-write and cascade modes are not modelled.
module bram_model
  import bist_pkg::*;
#(
  parameter int unsigned FAULT_BIT = 1000
) (
  input  logic               clk,
  input  logic               init,
  input  logic [5:0]         width,   // 1, 2, 4, 9, 18 or 36
  input  logic               fault_en,
  input  logic               en_a,
  input  logic               we_a,
  input  logic [BRAM_AW-1:0] addr_a,
  input  logic [BRAM_DW-1:0] din_a,
  output logic [BRAM_DW-1:0] dout_a,
  input  logic               en_b,
  input  logic               we_b,
  input  logic [BRAM_AW-1:0] addr_b,
  input  logic [BRAM_DW-1:0] din_b,
  output logic [BRAM_DW-1:0] dout_b
);
  logic mem [BRAM_BITS];

  function automatic logic [BRAM_DW-1:0] read_word(input logic [BRAM_AW-1:0] a);
    logic [BRAM_DW-1:0] w;
    int unsigned        idx;
    w = '0;
    for (int i = 0; i < BRAM_DW; i++) begin
      idx = 32'(a) * 32'(width) + i;
      if (i < 32'(width) && idx < BRAM_BITS)
        w[i] = mem[idx] && !(fault_en && idx == FAULT_BIT);
    end
    return w;
  endfunction

  always_ff @(posedge clk) begin
    if (init) begin
      for (int j = 0; j < BRAM_BITS; j++) mem[j] <= 1'b0;
      dout_a <= '0;
      dout_b <= '0;
    end else begin
      if (en_a) dout_a <= read_word(addr_a);
      if (en_b) dout_b <= read_word(addr_b);
      for (int i = 0; i < BRAM_DW; i++) begin
        if (en_a && we_a && i < 32'(width) && 32'(addr_a) * 32'(width) + i < BRAM_BITS)
          mem[32'(addr_a) * 32'(width) + i] <= din_a[i];
        if (en_b && we_b && i < 32'(width) && 32'(addr_b) * 32'(width) + i < BRAM_BITS)
          mem[32'(addr_b) * 32'(width) + i] <= din_b[i];
      end
    end
  end
endmodule
