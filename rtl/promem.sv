// promem: program memory of the processor, 1024 words of 8 bits.
//
// Holds the opcodes and the constants read by LDA. It is read-only: the
// contents come from the hex file INIT_FILE when the design is elaborated
// (one hex byte per line, '@addr' lines allowed; words the file leaves out
// read 0). The read is combinational and gated: dout shows word add while
// rd is high and rst is low, and 0 otherwise, so it can be ORed with the
// register bank onto the shared data bus. Size and ports follow the source
// document; loading by file is this design's choice.
module promem #(
  parameter int unsigned DEPTH     = 1024,
  parameter int unsigned W         = 8,
  parameter string       INIT_FILE = "rtl/demo_program.hex",
  localparam int unsigned AW       = $clog2(DEPTH)
) (
  input  logic [AW-1:0] add,
  input  logic          rd,
  input  logic          rst,
  output logic [W-1:0]  dout
);

  logic [W-1:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = '0;
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  assign dout = (rd && !rst) ? mem[add] : '0;

endmodule
