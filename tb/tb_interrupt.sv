// tb_interrupt: self-checking test of the single-interrupt block.
//
// Drives irq, boundary, busy, ei and di at random for 4000 cycles and keeps
// a reference of the request latch and the enable flag here: a rising edge
// of irq sets the request, take must equal request & enable & boundary &
// !busy, a take clears both, EI sets and DI clears the enable. Counts how
// often a request was taken and how often one was held back by busy or by
// a clear enable; both must happen.
module tb_interrupt;
  logic clk = 1'b0, rst = 1'b1;
  logic irq = 1'b0, boundary = 1'b0, busy = 1'b0, ei = 1'b0, di = 1'b0;
  logic take, ie, pending;
  logic r_irq = 1'b0, r_pend = 1'b0, r_ie = 1'b0;
  int checks = 0, failures = 0, n_take = 0, n_busy = 0, n_dis = 0;

  interrupt dut (.clk, .rst, .irq, .boundary, .busy, .ei, .di, .take, .ie, .pending);

  always #5 clk = ~clk;

  initial begin
    logic exp_take;
    @(negedge clk); rst = 1'b0;
    for (int k = 0; k < 4000; k++) begin
      irq = ($urandom % 6 == 0) ? ~irq : irq;
      boundary = ($urandom % 4 == 0); busy = 1'($urandom);
      ei = ($urandom % 10 == 0); di = ($urandom % 12 == 0);
      #1;
      exp_take = r_pend && r_ie && boundary && !busy;
      checks++;
      if (take !== exp_take || ie !== r_ie || pending !== r_pend) begin
        failures++;
        if (failures < 10) $display("FAIL take=%b ie=%b pending=%b expected %b %b %b at %0t", take, ie, pending, exp_take, r_ie, r_pend, $time);
      end
      if (exp_take) n_take++;
      if (r_pend && r_ie && boundary && busy) n_busy++;
      if (r_pend && !r_ie && boundary) n_dis++;
      @(posedge clk);
      if (irq && !r_irq) r_pend = 1'b1; else if (exp_take) r_pend = 1'b0;
      if (exp_take) r_ie = 1'b0; else if (ei) r_ie = 1'b1; else if (di) r_ie = 1'b0;
      r_irq = irq;
      @(negedge clk);
    end
    checks++; if (n_take == 0 || n_busy == 0 || n_dis == 0) failures++;
    $display("taken=%0d held_by_busy=%0d held_by_disable=%0d", n_take, n_busy, n_dis);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
