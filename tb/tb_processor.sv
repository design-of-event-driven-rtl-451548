// tb_processor: end-to-end test of the processor at its default size.
//
// The processor runs the demonstration program from its default program
// memory image. Alongside it, the instruction-level model of
// isa_model_pkg reads the same image and executes one instruction per four
// clock cycles. After
// every instruction the test compares the program counter, all 32
// registers and the C/Z/EQ/GT/LT flags, checks that the PC step strobe
// comes exactly on the fourth cycle, and checks dbus during every fetch.
// irq is pulsed three times: once while interrupts are disabled (the
// request must wait for EI), once inside the enabled wait loop, and once
// after DI (it must stay pending). Every mechanism of the design is counted
// and one that never happened counts as a failure. At the end a few
// register values are compared with hand-computed results, among them the
// eight ALU results for x = 8'hAA, y = 8'h55.
module tb_processor;
  import cpu_pkg::*;
  import isa_model_pkg::*;

  localparam logic [AW-1:0] VEC = 10'h3C0;   // default interrupt vector
  localparam int unsigned   SD  = 2;         // default stack depth

  logic clk = 1'b0, rst = 1'b1, irq = 1'b0;
  logic [7:0] dbus;
  logic int_ack;
  int checks = 0, failures = 0;

  processor dut (.clk, .rst, .irq, .dbus, .int_ack);

  always #5 clk = ~clk;

  isa_model_pkg::isa_model m;
  logic [7:0] image [1024] = '{default: 8'h00};
  int n_ack = 0;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (pc model %h dut %h) at %0t", what, m.pc, dut.u_pc.address, $time);
    end
  endtask

  always @(posedge clk) if (!rst && int_ack) n_ack++;

  // ---------------- stimulus and comparison ----------------
  int n_instr = 0, halts = 0, irq_sent = 0, ei_seen_at = -1, n_held = 0;
  logic done = 1'b0;

  initial begin
    m = new(10'h01F, VEC, SD);
    $readmemh("rtl/demo_program.hex", image);
    foreach (image[a]) m.rom[a] = image[a];
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    while (!done) begin
      // irq stimulus at the start of an instruction
      if ((irq_sent == 0 && n_instr == 20) ||
          (irq_sent == 1 && m.ie && m.n_int == 1 && m.sp == 0 && n_instr > ei_seen_at + 6) ||
          (irq_sent == 2 && m.n_di > 0)) begin
        irq = 1'b1; irq_sent++;
        if (!m.ie) n_held++;
        m.pend = 1'b1;
      end
      // fetch cycle: dbus carries the opcode
      #1 check(dbus == m.rom[m.pc], "dbus during fetch");
      for (int ph = 0; ph < 4; ph++) begin
        check(dut.u_cu.pcen == (ph == 3), "PC step on the fourth cycle only");
        @(posedge clk); #1;
      end
      irq = 1'b0;
      if (m.step()) halts++;
      n_instr++;
      if (m.n_ei > 0 && ei_seen_at < 0) ei_seen_at = n_instr;
      check(dut.u_pc.address == m.pc, "program counter");
      for (int i = 0; i < 32; i++) check(dut.u_rb.regs[i] == m.r[i], $sformatf("register R%0d", i));
      check(dut.u_fr.flags[4:0] == {m.lt, m.gt, m.eq, m.z, m.c}, "flags");
      check(dut.u_int.ie == m.ie && dut.u_int.pending == m.pend, "interrupt state");
      if (halts == 3) done = 1'b1;
    end
    // hand-computed results
    check(dut.u_rb.regs[8]  == 8'hFF, "ADD AA+55");
    check(dut.u_rb.regs[9]  == 8'h56, "ADD by 1");
    check(dut.u_rb.regs[10] == 8'h55, "SUB AA-55");
    check(dut.u_rb.regs[11] == 8'h54, "SUB by 1");
    check(dut.u_rb.regs[12] == 8'h00, "AND");
    check(dut.u_rb.regs[13] == 8'hFF, "OR");
    check(dut.u_rb.regs[14] == 8'hAA, "NOT");
    check(dut.u_rb.regs[15] == 8'hFF, "XOR");
    check(dut.u_rb.regs[6]  == 8'h05, "loop count");
    check(dut.u_rb.regs[16] == 8'h00 && dut.u_rb.regs[17] == 8'h00, "no wrong branch");
    check(dut.u_rb.regs[18] == 8'hFF, "subroutine result");
    check(dut.u_rb.regs[19] == 8'h02, "two interrupts served");
    check(dut.u_rb.regs[31] == 8'h5A, "end marker");
    check(dut.u_int.pending == 1'b1, "third request left pending after DI");
    check(n_ack == m.n_int, "int_ack pulses");
    // every mechanism happened
    for (int i = 0; i < 8; i++) check(m.n_alu[i] > 0, $sformatf("ALU op %0d used", i));
    check(m.n_mov0 > 0 && m.n_movn > 0 && m.n_lda > 0, "moves and LDA used");
    check(m.n_cmp_eq > 0 && m.n_cmp_gt > 0 && m.n_cmp_lt > 0, "all compare outcomes");
    check(m.n_jmp_t > 0 && m.n_jmp_nt > 0, "jump taken and not taken");
    check(m.n_call > 1 && m.n_ret > 0 && m.n_reti > 0, "call, ret, reti");
    check(m.n_ei > 0 && m.n_di > 0, "ei, di");
    check(m.n_int == 2, "interrupts taken");
    check(n_held > 0, "request held while disabled");
    check(m.n_full > 0, "return stack two deep");
    $display("instructions=%0d cycles=%0d alu=%p mov0=%0d movn=%0d lda=%0d cmp=%0d/%0d/%0d jmp=%0d/%0d call=%0d ret=%0d reti=%0d int=%0d held=%0d depth2=%0d",
             n_instr, n_instr * 4, m.n_alu, m.n_mov0, m.n_movn, m.n_lda, m.n_cmp_eq, m.n_cmp_gt, m.n_cmp_lt,
             m.n_jmp_t, m.n_jmp_nt, m.n_call, m.n_ret, m.n_reti, m.n_int, n_held, m.n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
