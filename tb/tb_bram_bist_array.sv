// tb_bram_bist_array: six block RAMs, two TPGs. Each configuration is run
// fault-free (no ORA may flag) and with a stuck-at-0 cell in RAM 2, which
// must be flagged by the two ORA sets that compare RAM 2 (sets 1 and 2)
// and by no other. A small depth keeps the runs short.
module tb_bram_bist_array;
  import bist_pkg::*;
  localparam int N = 6, FB = 40;
  logic clk = 1'b0, rst, init, ora_clr, start, done;
  bram_cfg_t cfg;
  logic [N-1:0] fault_en;
  logic [71:0]  ora_fail [N];
  int checks = 0, failures = 0;

  bram_bist_array #(.N_BRAM(N), .FAULT_BIT(FB)) dut (.clk, .rst, .init, .ora_clr, .start,
    .cfg, .fault_en, .done, .ora_fail);

  always #5 clk = ~clk;

  initial begin
    #20000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input bram_cfg_t c, input int faulty);
    int cyc = 0;
    cfg = c;
    fault_en = '0;
    if (faulty >= 0) fault_en[faulty] = 1'b1;
    init = 1'b1; ora_clr = 1'b1;
    @(posedge clk); #1;
    init = 1'b0; ora_clr = 1'b0; start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0;
    while (!done && cyc < 100000) begin @(posedge clk); #1; cyc++; end
    repeat (2) @(posedge clk); #1;
    for (int k = 0; k < N; k++) begin
      bit expect_flag = (faulty >= 0) && (k == faulty || k == (faulty + N - 1) % N);
      checks++;
      if ((ora_fail[k] != 0) != expect_flag) begin
        failures++;
        $display("alg %0d width %0d fault %0d: ORA set %0d = %h", c.alg, c.width, faulty, k, ora_fail[k]);
      end
    end
  endtask

  initial begin
    rst = 1'b1; init = 1'b0; ora_clr = 1'b0; start = 1'b0; fault_en = '0; cfg = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    run('{alg: ALG_MARCH_LR_BDS, width: 6'd36, depth: 15'd32}, -1);
    run('{alg: ALG_MARCH_LR_BDS, width: 6'd36, depth: 15'd32}, 2);
    run('{alg: ALG_MATS_PLUS, width: 6'd2, depth: 15'd64}, -1);
    run('{alg: ALG_MATS_PLUS, width: 6'd2, depth: 15'd64}, 2);
    run('{alg: ALG_MATS_PLUS, width: 6'd1, depth: 15'd128}, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
