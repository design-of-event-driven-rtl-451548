// interrupt: the processor's single interrupt (the "event" input).
//
// A rising edge on irq sets a pending latch. When the latch is set,
// interrupts are enabled (ie) and an instruction ends (boundary, the control
// unit's PC step strobe) that is not a taken CALL or a RET (busy), take
// pulses for that one cycle: the program counter then saves the return
// address and jumps to the vector, pending clears and ie clears, so a second
// interrupt waits until the routine re-enables with RETI or EI. DI clears
// ie. ie is 0 after reset. irq is sampled on the rising clock edge and must
// be synchronous to clk. The source document states only that there is one
// interrupt; the edge latch, the enable and the no-nesting rule are this
// design's choices.
module interrupt (
  input  logic clk,
  input  logic rst,
  input  logic irq,
  input  logic boundary,
  input  logic busy,
  input  logic ei,
  input  logic di,
  output logic take,
  output logic ie,
  output logic pending
);

  logic irq_q;
  logic rise;

  assign rise = irq && !irq_q;
  assign take = pending && ie && boundary && !busy;

  always_ff @(posedge clk) begin
    if (rst) begin
      irq_q   <= irq;
      pending <= 1'b0;
      ie      <= 1'b0;
    end else begin
      irq_q <= irq;
      if (rise)      pending <= 1'b1;
      else if (take) pending <= 1'b0;
      if (take)      ie <= 1'b0;
      else if (ei)   ie <= 1'b1;
      else if (di)   ie <= 1'b0;
    end
  end

endmodule
