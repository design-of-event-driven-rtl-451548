// isa_model_pkg: instruction-level reference model of the processor, for
// testbenches.
//
// The class isa_model holds the architectural state (PC, R0-R31, flags,
// interrupt enable and request, return stack) and executes one instruction
// per call of step(), following the opcode map of the instruction set and
// the interrupt rule: a pending request is taken at the end of an
// instruction when interrupts are enabled and the instruction was not a
// taken CALL, a RET or a RETI. It counts how often each mechanism occurs.
// It is written from the instruction-set description, not from the RTL.
package isa_model_pkg;

  class isa_model;
    logic [7:0] rom [1024];
    logic [7:0] r [32];
    logic [9:0] pc, vec;
    logic [9:0] stk [];
    int         sp, depth;
    logic       c, z, eq, gt, lt, ie, pend;

    // mechanism counters
    int n_alu [8];
    int n_mov0, n_movn, n_lda, n_cmp_eq, n_cmp_gt, n_cmp_lt;
    int n_jmp_t, n_jmp_nt, n_call, n_ret, n_reti, n_ei, n_di;
    int n_int, n_full, n_nop;

    function new(input logic [9:0] reset_pc, input logic [9:0] vector, input int stack_depth);
      depth = stack_depth;
      stk = new[stack_depth];
      vec = vector;
      for (int i = 0; i < 1024; i++) rom[i] = 8'h00;
      reset(reset_pc);
    endfunction

    function void reset(input logic [9:0] reset_pc);
      for (int i = 0; i < 32; i++) r[i] = 8'h00;
      foreach (stk[i]) stk[i] = '0;
      pc = reset_pc; sp = 0;
      {c, z, eq, gt, lt, ie, pend} = '0;
    endfunction

    function void push(input logic [9:0] v);
      stk[(sp >= depth) ? depth - 1 : sp] = v;
      if (sp < depth) sp++;
      if (sp == depth) n_full++;
    endfunction

    function logic [9:0] pop();
      int p = (sp == 0) ? 0 : sp - 1;
      sp = p;
      return stk[p];
    endfunction

    function logic cond(input logic [2:0] cc);
      case (cc)
        3'd0: return 1'b1;
        3'd1: return z;
        3'd2: return !z;
        3'd3: return c;
        3'd4: return !c;
        3'd5: return eq;
        3'd6: return gt;
        default: return lt;
      endcase
    endfunction

    // Executes the instruction at pc; returns 1 if it was a jump to itself
    function logic step();
      logic [7:0] op = rom[pc];
      logic [9:0] nxt = pc + 10'd1;
      logic [9:0] tgt = {r[3][1:0], r[2]};
      logic       busy = 1'b0, e = 1'b0, d = 1'b0, halt = 1'b0;
      logic [8:0] w;
      logic [7:0] x, y, b;
      case (op[7:6])
        2'b00: if (!op[5]) begin r[0] = r[op[4:0]]; n_mov0++; end
               else        begin r[op[4:0]] = r[0]; n_movn++; end
        2'b01: begin
          x = r[0]; y = r[{2'b00, op[2:0]}];
          case (op[5:3])
            3'd0: w = {1'b0, x} + {1'b0, y};
            3'd1: w = {1'b0, y} + 9'd1;
            3'd2: w = {1'b0, x} - {1'b0, y};
            3'd3: w = {1'b0, y} - 9'd1;
            3'd4: w = {1'b0, x & y};
            3'd5: w = {1'b0, x | y};
            3'd6: w = {1'b0, ~y};
            default: w = {1'b0, x ^ y};
          endcase
          r[0] = w[7:0]; c = w[8]; z = (w[7:0] == 8'h00);
          n_alu[op[5:3]]++;
        end
        2'b10: case (op[5:3])
          3'd0: if (cond(op[2:0])) begin
                  if (tgt == pc) halt = 1'b1;
                  nxt = tgt; n_jmp_t++;
                end else n_jmp_nt++;
          3'd1: if (cond(op[2:0])) begin push(pc + 10'd1); nxt = tgt; busy = 1'b1; n_call++; end
          3'd2: begin nxt = pop(); busy = 1'b1; n_ret++; end
          3'd3: begin nxt = pop(); busy = 1'b1; e = 1'b1; n_reti++; end
          3'd4: begin e = 1'b1; n_ei++; end
          3'd5: begin d = 1'b1; n_di++; end
          default: n_nop++;
        endcase
        default: if (!op[5]) begin r[0] = rom[{5'b0, op[4:0]}]; n_lda++; end
                 else begin
                   b = r[op[4:0]];
                   eq = (r[0] == b); gt = (r[0] > b); lt = (r[0] < b);
                   if (eq) n_cmp_eq++;
                   if (gt) n_cmp_gt++;
                   if (lt) n_cmp_lt++;
                 end
      endcase
      if (pend && ie && !busy) begin
        push(nxt); nxt = vec; ie = 1'b0; pend = 1'b0; n_int++;
      end else if (e) ie = 1'b1;
      else if (d) ie = 1'b0;
      pc = nxt;
      return halt;
    endfunction
  endclass

endpackage
