// tb_processor_random: random-program test of the processor.
//
// Ten times over, the program memory is filled with random bytes (written
// into the memory array from the testbench), the processor is reset and
// runs 1500 instructions while irq is pulsed at random. The instruction-set
// model of isa_model_pkg runs the same bytes; after every instruction the
// PC, all registers, the flags and the interrupt state must agree, and the
// PC step must fall on every fourth cycle. Random code reaches every opcode,
// random jump targets, stack overflow and underflow, and interrupts in every
// position; the run fails if no interrupt was taken or no stack overflow
// happened.
module tb_processor_random;
  import isa_model_pkg::*;

  logic clk = 1'b0, rst = 1'b1, irq = 1'b0;
  logic [7:0] dbus;
  logic int_ack;
  int checks = 0, failures = 0;

  processor #(.PM_INIT("")) dut (.clk, .rst, .irq, .dbus, .int_ack);

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    automatic isa_model_pkg::isa_model m = new(10'h01F, 10'h3C0, 2);
    automatic int ints = 0, fulls = 0, opseen = 0;
    automatic logic last = 1'b0;
    for (int run = 0; run < 10; run++) begin
      rst = 1'b1; irq = 1'b0;
      @(negedge clk);  // after the memory's own initialisation
      for (int a = 0; a < 1024; a++) begin
        m.rom[a] = 8'($urandom);
        dut.u_pm.mem[a] = m.rom[a];
      end
      m.reset(10'h01F);
      repeat (2) @(posedge clk);
      #1 rst = 1'b0;
      for (int k = 0; k < 1500; k++) begin
        // a pulse lasts one instruction and is never followed directly by another
        if (!last && $urandom % 12 == 0) begin irq = 1'b1; m.pend = 1'b1; last = 1'b1; end
        else last = 1'b0;
        #1 check(dbus == m.rom[m.pc], "opcode on the bus");
        for (int ph = 0; ph < 4; ph++) begin
          check(dut.u_cu.pcen == (ph == 3), "PC step on the fourth cycle only");
          @(posedge clk); #1;
        end
        irq = 1'b0;
        void'(m.step());
        check(dut.u_pc.address == m.pc, "program counter");
        for (int i = 0; i < 32; i++) check(dut.u_rb.regs[i] == m.r[i], $sformatf("register R%0d", i));
        check(dut.u_fr.flags[4:0] == {m.lt, m.gt, m.eq, m.z, m.c}, "flags");
        check(dut.u_int.ie == m.ie && dut.u_int.pending == m.pend, "interrupt state");
        #0;
      end
    end
    ints = m.n_int; fulls = m.n_full;
    for (int i = 0; i < 8; i++) if (m.n_alu[i] > 0) opseen++;
    $display("interrupts=%0d stack_full=%0d calls=%0d rets=%0d retis=%0d alu_codes=%0d", ints, fulls, m.n_call, m.n_ret, m.n_reti, opseen);
    check(ints > 0 && fulls > 0 && opseen == 8 && m.n_reti > 0, "mechanisms reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
