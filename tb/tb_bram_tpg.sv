// tb_bram_tpg: runs each algorithm on a small RAM held in the testbench.
// Every read must find the value the march element expects (the TPG puts
// that value on din), the operation count must be 38 x depth for March LR
// with backgrounds and 2 x 5 x depth for MATS+ (port A pass, then port B),
// and the address order of each element is checked against the written
// notation by counting the steps to a lower address.
module tb_bram_tpg;
  import bist_pkg::*;
  logic clk = 1'b0, rst, start, busy, done;
  bram_cfg_t cfg;
  logic en_a, we_a, en_b, we_b;
  logic [13:0] addr_a, addr_b;
  logic [35:0] din_a, din_b;
  int checks = 0, failures = 0;
  logic [35:0] mem [1024];

  bram_tpg dut (.clk, .rst, .start, .cfg, .busy, .done, .en_a, .we_a, .addr_a, .din_a,
                .en_b, .we_b, .addr_b, .din_b);

  always #5 clk = ~clk;

  initial begin
    #20000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  task automatic run(input ram_alg_e alg, input int width, input int depth,
                     input int exp_ops, input int exp_b_ops);
    int ops = 0, b_ops = 0, reads = 0, downs = 0;
    logic [13:0] prev;
    logic        have_prev = 1'b0;
    for (int a = 0; a < depth; a++) mem[a] = 36'({$urandom, $urandom});
    cfg = '{alg: alg, width: 6'(width), depth: 15'(depth)};
    start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0;
    while (!done && ops < 200000) begin
      check(busy && (en_a ^ en_b), "exactly one port active while busy");
      if (en_a) begin
        if (!we_a) begin
          check(mem[addr_a] == din_a, $sformatf("port A read @%0d: %h, expected %h", addr_a, mem[addr_a], din_a));
          reads++;
        end else mem[addr_a] = din_a;
        if (have_prev && addr_a < prev) downs++;
        prev = addr_a;
      end else begin
        b_ops++;
        if (!we_b) check(mem[addr_b] == din_b, $sformatf("port B read @%0d", addr_b));
        else mem[addr_b] = din_b;
      end
      have_prev = 1'b1;
      check(addr_a < 14'(depth), "address outside the RAM");
      check((din_a >> width) == 0, "data above the width");
      ops++;
      @(posedge clk); #1;
    end
    check(ops == exp_ops, $sformatf("%s: %0d operations, expected %0d", alg.name(), ops, exp_ops));
    check(b_ops == exp_b_ops, $sformatf("%s: %0d port B operations", alg.name(), b_ops));
    // Port A steps to a lower address inside each descending element and at
    // each wrap from the top of one ascending element to the next.
    check(reads > 0, "no reads");
    check(downs == ((alg == ALG_MATS_PLUS) ? depth : depth + 8),
          $sformatf("%s: %0d descending address steps", alg.name(), downs));
    check(!busy, "busy after done");
  endtask

  initial begin
    rst = 1'b1; start = 1'b0; cfg = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    run(ALG_MARCH_LR_BDS, 36, 64, (14 + 4 * N_BDS) * 64, 0);
    run(ALG_MATS_PLUS, 2, 128, 2 * 5 * 128, 5 * 128);
    run(ALG_MATS_PLUS, 1, 256, 2 * 5 * 256, 5 * 256);
    run(ALG_MARCH_LR_BDS, 36, 512, 58 * 512 - 20 * 512, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
