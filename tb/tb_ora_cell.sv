// tb_ora_cell: checks that the ORA flag is the running OR of left xor right
// and that clear resets it. Random stimulus, reference kept in the testbench.
module tb_ora_cell;
  logic clk = 1'b0, clr, left, right, fail;
  int   checks = 0, failures = 0;
  logic model;

  ora_cell dut (.clk, .clr, .left, .right, .fail);

  always #5 clk = ~clk;

  initial begin
    #100000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clr = 1'b1; left = 1'b0; right = 1'b0; model = 1'b0;
    @(posedge clk); #1;
    for (int n = 0; n < 2000; n++) begin
      clr   = ($urandom % 50) == 0;
      // mostly equal inputs, so the flag is often clear for long stretches
      left  = 1'($urandom);
      right = (($urandom % 40) == 0) ? ~left : left;
      @(posedge clk);
      model = clr ? 1'b0 : (model | (left ^ right));
      #1;
      checks++;
      if (fail !== model) begin
        failures++;
        if (failures < 5) $display("mismatch at %0d: fail=%b expected %b", n, fail, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
