// alu: 8-bit arithmetic and logic unit of the processor.
//
// Eight operations chosen by sel: ADD (x+y+cin), ADD by 1 (y+1), SUB
// (x-y-cin), SUB by 1 (y-1), AND, OR, NOT (~y) and XOR. The codes and the
// operand each unary operation uses are those of the source document's ALU
// waveform. cout is the carry of ADD and ADD by 1 and the borrow of SUB and
// SUB by 1, 0 for the logic operations; that, the use of cin, and forcing
// r and cout to 0 while en is low are this design's choices.
// Purely combinational.
module alu
  import cpu_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  logic [2:0]   sel,
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic         cin,
  input  logic         en,
  output logic [W-1:0] r,
  output logic         cout
);

  logic [W:0] wide;

  always_comb begin
    wide = '0;
    unique case (alu_op_e'(sel))
      ALU_ADD: wide = {1'b0, x} + {1'b0, y} + {{W{1'b0}}, cin};
      ALU_INC: wide = {1'b0, y} + 1'b1;
      ALU_SUB: wide = {1'b0, x} - {1'b0, y} - {{W{1'b0}}, cin};
      ALU_DEC: wide = {1'b0, y} - 1'b1;
      ALU_AND: wide = {1'b0, x & y};
      ALU_OR : wide = {1'b0, x | y};
      ALU_NOT: wide = {1'b0, ~y};
      ALU_XOR: wide = {1'b0, x ^ y};
    endcase
    r    = en ? wide[W-1:0] : '0;
    cout = en ? wide[W]     : 1'b0;
  end

endmodule
