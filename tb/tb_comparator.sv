// tb_comparator: exhaustive test of the comparator over all 65536 operand
// pairs; exactly one of eq, gt, lt must be high and it must be the right one.
module tb_comparator;
  logic [7:0] a, b;
  logic eq, gt, lt;
  int checks = 0, failures = 0;

  comparator dut (.a, .b, .eq, .gt, .lt);

  initial begin
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        a = 8'(i); b = 8'(j); #1;
        checks++;
        if (eq !== (i == j) || gt !== (i > j) || lt !== (i < j)) begin
          failures++;
          if (failures < 10) $display("FAIL a=%0d b=%0d eq=%b gt=%b lt=%b", i, j, eq, gt, lt);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
