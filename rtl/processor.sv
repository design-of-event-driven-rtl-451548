// processor: event-driven 8-bit RISC processor, top level.
//
// A control unit steps each instruction through four clock cycles (fetch,
// read B, read A, write). The program memory (1024 x 8, read-only) and the
// register bank (32 x 8, the data memory) each drive 0 unless read, so
// their outputs are ORed into one 8-bit data bus, dbus, which carries both
// opcodes and operands to the control unit. The program address is the PC
// in the fetch phase and the control unit's pmadd (LDA constant address)
// otherwise. The ALU works on the control unit's A and B latches and its
// result is written back to R0; the comparator serves CMP; the flag
// register holds C, Z, EQ, GT, LT; the interrupt block turns a rising edge
// on irq into a call to the interrupt vector at the end of an instruction.
//
// Ports: clk; rst (synchronous, active high, hold for at least one cycle);
// irq (event input, synchronous to clk); dbus (the data bus); int_ack (one
// cycle when the interrupt is taken). An instruction takes 4 clk cycles, so
// the instruction rate is f_clk / 4. The ALU's carry input is tied to 0:
// the opcode map has no add-with-carry. The block set and the data bus
// follow the source document; timing and opcode map are this design's
// (see cu and cpu_pkg).
module processor
  import cpu_pkg::*;
#(
  parameter int unsigned   PM_DEPTH    = 1024,
  parameter int unsigned   DM_DEPTH    = 32,
  parameter logic [AW-1:0] PC_RESET    = 10'h01F,
  parameter logic [AW-1:0] INT_VECTOR  = 10'h3C0,
  parameter int unsigned   STACK_DEPTH = 2,
  parameter string         PM_INIT     = "rtl/demo_program.hex"
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          irq,
  output logic [DW-1:0] dbus,
  output logic          int_ack
);

  logic [AW-1:0] pc_addr, pmadd, pm_add;
  logic [DW-1:0] pm_dout, rb_dout;
  logic [DW-1:0] aluina, aluinb, aluinac, aluinbc, alures, dmout;
  logic [3:0]    alusel;
  logic [RW-1:0] dmadd;
  logic [7:0]    fin;
  logic          call, dmr, dmw, jmp, pmr, ret, fetch, pcen;
  logic          alu_we, cmp_we, ei, di, alucout;
  logic          eq, gt, lt, ie, ip, take;

  assign pm_add  = fetch ? pc_addr : pmadd;
  assign dbus    = pm_dout | rb_dout;
  assign int_ack = take;

  pc #(
    .AW(AW), .RESET_ADDR(PC_RESET), .INT_VECTOR(INT_VECTOR), .STACK_DEPTH(STACK_DEPTH)
  ) u_pc (
    .clock(clk), .reset(rst), .en(pcen), .pcin(pmadd),
    .jmp, .call, .ret, .intr(take), .address(pc_addr)
  );

  promem #(.DEPTH(PM_DEPTH), .W(DW), .INIT_FILE(PM_INIT)) u_pm (
    .add(pm_add[$clog2(PM_DEPTH)-1:0]), .rd(pmr), .rst, .dout(pm_dout)
  );

  regbank #(.DEPTH(DM_DEPTH), .W(DW)) u_rb (
    .clk, .rst, .add(dmadd[$clog2(DM_DEPTH)-1:0]), .din(dmout), .rd(dmr), .wr(dmw), .dout(rb_dout)
  );

  cu u_cu (
    .clk, .rst, .op(dbus), .dmin(dbus), .alures, .fin,
    .aluina, .aluinac, .aluinb, .aluinbc, .alusel, .dmadd, .dmout, .pmadd,
    .call, .dmr, .dmw, .jmp, .pmr, .ret, .fetch, .pcen, .alu_we, .cmp_we, .ei, .di
  );

  alu #(.W(DW)) u_alu (
    .sel(alusel[2:0]), .x(aluina), .y(aluinb), .cin(1'b0), .en(alusel[3]),
    .r(alures), .cout(alucout)
  );

  comparator #(.W(DW)) u_cmp (.a(aluinac), .b(aluinbc), .eq, .gt, .lt);

  flagreg u_fr (
    .clk, .rst, .alu_we, .cout(alucout), .res(alures), .cmp_we, .eq, .gt, .lt,
    .ie, .ip, .flags(fin)
  );

  interrupt u_int (
    .clk, .rst, .irq, .boundary(pcen), .busy(call || ret), .ei, .di,
    .take, .ie, .pending(ip)
  );

endmodule
