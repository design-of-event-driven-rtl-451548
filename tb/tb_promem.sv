// tb_promem: self-checking test of the program memory.
//
// Loads tb/promem_test.hex, which holds (a * 37 + 11) mod 256 at the
// addresses a = 0..63 and 960..1023 and nothing elsewhere (those words must
// read 0), and reads every word back: dout must show the word while rd is
// high and rst low, and 0 otherwise. The address sweep of the source
// document's waveform (1, 3, 7, 15, ...) comes first.
module tb_promem;
  logic [9:0] add;
  logic rd, rst;
  logic [7:0] dout;
  int checks = 0, failures = 0;

  promem #(.INIT_FILE("tb/promem_test.hex")) dut (.add, .rd, .rst, .dout);

  function automatic logic [7:0] word(input int a);
    return (a < 64 || a >= 960) ? 8'((a * 37 + 11) % 256) : 8'h00;
  endfunction

  task automatic check(input logic ok);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL add=%0d rd=%b rst=%b dout=%h", add, rd, rst, dout); end
  endtask

  initial begin
    rst = 1'b0; rd = 1'b1;
    for (int i = 1; i <= 10; i++) begin
      add = 10'((1 << i) - 1); #1 check(dout == word(int'(add)));
    end
    for (int a = 0; a < 1024; a++) begin
      add = 10'(a);
      rd = 1'b1; rst = 1'b0; #1 check(dout == word(a));
      rd = 1'b0;             #1 check(dout == 8'h00);
      rd = 1'b1; rst = 1'b1; #1 check(dout == 8'h00);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
