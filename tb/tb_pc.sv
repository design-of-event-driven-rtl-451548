// tb_pc: self-checking test of the program counter.
//
// Checks the reset address 0000011111, that nothing moves while en is low,
// then drives 4000 random steps (increment, jump, call, return, interrupt)
// against a reference counter and two-entry return stack kept here. Calls
// and interrupts nest at most two deep in the stimulus except on purpose at
// the end, where a third push must overwrite the top entry.
module tb_pc;
  logic clk = 1'b0, rst = 1'b1, en = 1'b0, jmp = 1'b0, call = 1'b0, ret = 1'b0, intr = 1'b0;
  logic [9:0] pcin = '0, address;
  logic [9:0] r_pc, stk [2];
  int sp = 0, checks = 0, failures = 0, n_call = 0, n_ret = 0, n_int = 0, n_jmp = 0;

  pc dut (.clock(clk), .reset(rst), .en, .pcin, .jmp, .call, .ret, .intr, .address);

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s: address=%h expected %h at %0t", what, address, r_pc, $time); end
  endtask

  function automatic void push(input logic [9:0] v);
    stk[(sp >= 2) ? 1 : sp] = v;
    if (sp < 2) sp++;
  endfunction

  initial begin
    logic [9:0] nxt;
    int kind;
    @(negedge clk); rst = 1'b0;
    r_pc = 10'h01F;
    check(address == 10'b0000011111, "reset value");
    repeat (3) begin
      pcin = 10'($urandom); jmp = 1'b1; @(negedge clk);
      check(address == r_pc, "hold while en low");
    end
    jmp = 1'b0;
    for (int k = 0; k < 4000; k++) begin
      {jmp, call, ret, intr} = '0;
      en = ($urandom % 5 != 0); pcin = 10'($urandom);
      kind = $urandom % 10;
      if (kind == 0 || kind == 1) jmp = 1'b1;
      else if (kind == 2 && sp < 2) call = 1'b1;
      else if (kind == 3 && sp > 0) ret = 1'b1;
      else if (kind == 4 && sp < 2) intr = 1'b1;
      else if (kind == 5 && sp < 2) begin jmp = 1'b1; intr = 1'b1; end
      @(posedge clk);
      if (en) begin
        nxt = r_pc + 10'd1;
        if (jmp) nxt = pcin;
        if (call) begin push(r_pc + 10'd1); nxt = pcin; n_call++; end
        if (ret) begin sp--; nxt = stk[sp]; n_ret++; end
        if (intr) begin push(nxt); nxt = 10'h3C0; n_int++; end
        if (jmp && !intr) n_jmp++;
        r_pc = nxt;
      end
      @(negedge clk);
      check(address == r_pc, "step");
    end
    // overflow: fill two entries, the third push replaces the top one
    {jmp, call, ret, intr} = '0; en = 1'b1;
    while (sp < 2) begin
      call = 1'b1; pcin = 10'h100; @(posedge clk); push(r_pc + 10'd1); r_pc = 10'h100; @(negedge clk);
    end
    call = 1'b1; pcin = 10'h200; @(posedge clk); push(r_pc + 10'd1); r_pc = 10'h200; @(negedge clk);
    call = 1'b0; ret = 1'b1;
    @(posedge clk); sp--; r_pc = stk[sp]; @(negedge clk); check(address == r_pc && r_pc == 10'h101, "overflow overwrites top");
    @(posedge clk); sp--; r_pc = stk[sp]; @(negedge clk); check(address == r_pc, "second pop");
    checks++; if (n_call == 0 || n_ret == 0 || n_int == 0 || n_jmp == 0) failures++;
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
