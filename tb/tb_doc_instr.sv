// tb_doc_instr: the two instructions the source document simulates, run on
// the whole processor.
//
// Program (from the reset address 0x01F): LDA 02H, MOV R2,R0, LDA 01H,
// MOV R0,R2, NOP, NOP, with program word 1 = 8'b1010_1010 and word 2 =
// 8'b1111_1010. LDA 01H (8'b1100_0001) must show a program read of the
// opcode, then a program read of word 1 with 8'b1010_1010 on the data bus,
// then a write of that value into R0. MOV R0,R2 (8'b0000_0010) must show the
// opcode read, a register read of R2 with 8'b1111_1010 on the bus, and the
// write into R0. Each instruction must take exactly four clock cycles.
module tb_doc_instr;
  logic clk = 1'b0, rst = 1'b1, irq = 1'b0;
  logic [7:0] dbus;
  logic int_ack;
  int checks = 0, failures = 0;

  processor #(.PM_INIT("tb/doc_instr.hex")) dut (.clk, .rst, .irq, .dbus, .int_ack);

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // Checks the four phases of one instruction
  task automatic instr(input logic [7:0] opcode, input logic rd_prog, input logic [4:0] rd_reg,
                       input logic [7:0] operand, input logic [4:0] wr_reg, input string name);
    check(dut.pmr && !dut.dmr && dbus == opcode, {name, ": opcode fetch"});
    @(posedge clk); #1;
    if (rd_prog) check(dut.pmr && !dut.dmr && dut.pm_add == 10'(rd_reg) && dbus == operand, {name, ": program read"});
    else         check(dut.dmr && !dut.pmr && dut.dmadd == rd_reg && dbus == operand, {name, ": register read"});
    check(!dut.dmw && !dut.pcen, {name, ": no write yet"});
    @(posedge clk); #1;
    check(!dut.dmw && !dut.pcen, {name, ": third phase"});
    @(posedge clk); #1;
    check(dut.dmw && dut.dmadd == wr_reg && dut.dmout == operand && dut.pcen, {name, ": write and PC step"});
    @(posedge clk); #1;
    check(dut.u_rb.regs[wr_reg] == operand, {name, ": register written"});
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    #1;
    check(dut.u_pc.address == 10'h01F, "reset address");
    instr(8'hC2, 1'b1, 5'd2, 8'b1111_1010, 5'd0, "LDA 02H");
    instr(8'h22, 1'b0, 5'd0, 8'b1111_1010, 5'd2, "MOV R2,R0");
    instr(8'b1100_0001, 1'b1, 5'd1, 8'b1010_1010, 5'd0, "LDA 01H");
    instr(8'b0000_0010, 1'b0, 5'd2, 8'b1111_1010, 5'd0, "MOV R0,R2");
    check(dut.u_pc.address == 10'h023, "PC after four instructions");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
