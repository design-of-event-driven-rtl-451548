// tb_flagreg: self-checking test of the flag register.
//
// Random load strobes and inputs for 2000 cycles; a shadow copy of the five
// stored flags is updated here on each rising edge, and IE/IP must follow
// their inputs at once. Bit 7 must stay 0.
module tb_flagreg;
  import cpu_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  logic alu_we = 1'b0, cout = 1'b0, cmp_we = 1'b0, eq = 1'b0, gt = 1'b0, lt = 1'b0, ie = 1'b0, ip = 1'b0;
  logic [7:0] res = '0, flags;
  logic sc = 1'b0, sz = 1'b0, seq = 1'b0, sgt = 1'b0, slt = 1'b0;
  int checks = 0, failures = 0;

  flagreg dut (.clk, .rst, .alu_we, .cout, .res, .cmp_we, .eq, .gt, .lt, .ie, .ip, .flags);

  always #5 clk = ~clk;

  initial begin
    @(negedge clk); rst = 1'b0;
    for (int k = 0; k < 2000; k++) begin
      alu_we = 1'($urandom); cout = 1'($urandom); res = ($urandom % 4 == 0) ? 8'h00 : 8'($urandom);
      cmp_we = 1'($urandom); eq = 1'($urandom); gt = 1'($urandom); lt = 1'($urandom);
      ie = 1'($urandom); ip = 1'($urandom);
      #1;
      checks++;
      if (flags !== {1'b0, ip, ie, slt, sgt, seq, sz, sc}) begin
        failures++;
        if (failures < 10) $display("FAIL flags=%b expected %b", flags, {1'b0, ip, ie, slt, sgt, seq, sz, sc});
      end
      @(posedge clk);
      if (alu_we) begin sc = cout; sz = (res == 8'h00); end
      if (cmp_we) begin seq = eq; sgt = gt; slt = lt; end
      @(negedge clk);
    end
    rst = 1'b1; @(negedge clk);
    checks++;
    if (flags[4:0] !== 5'b0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
