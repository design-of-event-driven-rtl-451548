// tb_regbank: self-checking test of the 32 x 8 register bank.
//
// Checks that reset clears every register, that dout is 0 whenever rd is
// low, and runs 3000 random cycles of reads and writes against a shadow
// array kept here. A write becomes visible on the read port after the
// falling edge on which wr was high; inputs change on the rising edge.
module tb_regbank;
  logic clk = 1'b0, rst = 1'b1, rd = 1'b0, wr = 1'b0;
  logic [4:0] add = '0;
  logic [7:0] din = '0, dout;
  logic [7:0] shadow [32];
  int checks = 0, failures = 0;

  regbank dut (.clk, .rst, .add, .din, .rd, .wr, .dout);

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    // fill with something, then reset must clear it
    @(posedge clk); rst = 1'b0;
    for (int i = 0; i < 32; i++) begin
      add = 5'(i); din = 8'(i * 7 + 1); wr = 1'b1; @(posedge clk);
    end
    wr = 1'b0; rd = 1'b1; add = 5'd9; #1 check(dout == 8'd64, "write then read R9");
    rst = 1'b1; @(posedge clk); rst = 1'b0;
    for (int i = 0; i < 32; i++) begin
      add = 5'(i); rd = 1'b1; #1 check(dout == 8'h00, "cleared by reset");
      shadow[i] = 8'h00;
    end
    for (int k = 0; k < 3000; k++) begin
      @(posedge clk);
      add = 5'($urandom); din = 8'($urandom); rd = 1'($urandom); wr = 1'($urandom);
      #1 check(dout == (rd ? shadow[add] : 8'h00), "read port");
      @(negedge clk);
      if (wr) shadow[add] = din;
      #1 check(dout == (rd ? shadow[add] : 8'h00), "read port after the write edge");
    end
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
