// regbank: data memory of the processor, 32 registers of 8 bits.
//
// One address serves reads and writes. A write stores din at add on the
// falling clock edge while wr is high, as the source document specifies;
// in the processor that edge lies in the middle of the write phase, when
// address and data have been stable for half a cycle. The read is
// combinational and gated: dout shows register add while rd is high and is
// 0 otherwise, so the bank can share the data bus with the program memory
// by a plain OR. A reset sampled on the same falling edge clears every
// register. Size, ports, clock edge, gated read and the clearing reset
// follow the source document; the clk port itself is not drawn in its
// block symbol and is added here.
module regbank #(
  parameter int unsigned DEPTH = 32,
  parameter int unsigned W     = 8,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [AW-1:0] add,
  input  logic [W-1:0]  din,
  input  logic          rd,
  input  logic          wr,
  output logic [W-1:0]  dout
);

  logic [W-1:0] regs [DEPTH];

  always_ff @(negedge clk) begin
    if (rst) begin
      for (int i = 0; i < DEPTH; i++) regs[i] <= '0;
    end else if (wr) begin
      regs[add] <= din;
    end
  end

  assign dout = rd ? regs[add] : '0;

endmodule
