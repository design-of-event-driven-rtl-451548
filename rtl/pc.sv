// pc: program counter of the processor.
//
// address is the opcode address of the current instruction. On the rising
// clock edge with en high (the last phase of an instruction) it moves to:
// pcin on jmp or call (call first pushes address+1), the popped return
// address on ret, address+1 otherwise. If intr is high as well (the
// document calls this input int, a keyword in SystemVerilog), the address
// chosen that way is pushed and the counter goes to INT_VECTOR instead.
// Return addresses sit in a STACK_DEPTH-entry stack (at least 2); a push onto a full
// stack overwrites the top entry and a pop of an empty one returns entry 0.
// Reset loads RESET_ADDR = 0000011111 as the source document specifies; the
// ports are the document's plus en. The stack and the vector address are
// this design's choices. intr must not come together with call or ret.
module pc #(
  parameter int unsigned    AW          = 10,
  parameter logic [AW-1:0]  RESET_ADDR  = 10'h01F,
  parameter logic [AW-1:0]  INT_VECTOR  = 10'h3C0,
  parameter int unsigned    STACK_DEPTH = 2,
  localparam int unsigned   SPW         = $clog2(STACK_DEPTH + 1)
) (
  input  logic          clock,
  input  logic          reset,
  input  logic          en,
  input  logic [AW-1:0] pcin,
  input  logic          jmp,
  input  logic          call,
  input  logic          ret,
  input  logic          intr,
  output logic [AW-1:0] address
);

  logic [AW-1:0]  stack [STACK_DEPTH];
  logic [SPW-1:0] sp;               // number of valid entries
  logic [AW-1:0]  seq, top, next;
  logic [SPW-1:0] sp_pop;

  assign seq    = address + 1'b1;
  assign sp_pop = (sp == '0) ? '0 : sp - 1'b1;
  assign top    = stack[sp_pop[$clog2(STACK_DEPTH)-1:0]];

  always_comb begin
    if (jmp || call) next = pcin;
    else if (ret)    next = top;
    else             next = seq;
  end

  // Slot written by a push, after a pop in the same instruction if any
  function automatic logic [$clog2(STACK_DEPTH)-1:0] slot(input logic [SPW-1:0] n);
    return (n >= SPW'(STACK_DEPTH)) ? $clog2(STACK_DEPTH)'(STACK_DEPTH - 1)
                                    : n[$clog2(STACK_DEPTH)-1:0];
  endfunction

  always_ff @(posedge clock) begin
    if (reset) begin
      address <= RESET_ADDR;
      sp      <= '0;
      for (int i = 0; i < STACK_DEPTH; i++) stack[i] <= '0;
    end else if (en) begin
      if (call) begin
        stack[slot(sp)] <= seq;
        if (sp < SPW'(STACK_DEPTH)) sp <= sp + 1'b1;
      end else if (ret) begin
        sp <= sp_pop;
      end
      if (intr && !call && !ret) begin
        stack[slot(sp)] <= next;
        if (sp < SPW'(STACK_DEPTH)) sp <= sp + 1'b1;
        address <= INT_VECTOR;
      end else begin
        address <= next;
      end
    end
  end

  a_int_alone: assert property (@(posedge clock) disable iff (reset)
    en && intr |-> !call && !ret);

endmodule
