// tb_cu: self-checking test of the control unit.
//
// Plays the two instructions of the source document's control-unit
// waveforms first: MOV R0,R2 (8'b0000_0010) with R2 = 8'b1111_1010 and
// LDA 01H (8'b1100_0001) with word 1 = 8'b1010_1010, and checks the printed
// strobe order (program read, then data read at the operand address, then
// data write of the read value). Then 3000 random opcodes with random bus
// data, flags and ALU result: in every phase all strobes, addresses, write
// data, PC controls and flag loads are compared with a decoder written here
// from the opcode map. The PC step strobe must come once every four cycles.
module tb_cu;
  import cpu_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  logic [7:0] op = '0, dmin = '0, alures = '0, fin = '0;
  logic [7:0] aluina, aluinac, aluinb, aluinbc, dmout;
  logic [3:0] alusel;
  logic [4:0] dmadd;
  logic [9:0] pmadd;
  logic call, dmr, dmw, jmp, pmr, ret, fetch, pcen, alu_we, cmp_we, ei, di;
  int checks = 0, failures = 0;

  cu dut (.clk, .rst, .op, .dmin, .alures, .fin, .aluina, .aluinac, .aluinb, .aluinbc, .alusel,
          .dmadd, .dmout, .pmadd, .call, .dmr, .dmw, .jmp, .pmr, .ret, .fetch, .pcen,
          .alu_we, .cmp_we, .ei, .di);

  always #5 clk = ~clk;

  typedef struct packed {
    logic fetch, pmr, dmr, dmw, jmp, call, ret, pcen, alu_we, cmp_we, ei, di;
    logic [4:0] dmadd;
    logic [7:0] dmout;
    logic [9:0] pmadd;
  } ctl_t;

  function automatic ctl_t got();
    return '{fetch, pmr, dmr, dmw, jmp, call, ret, pcen, alu_we, cmp_we, ei, di, dmadd, dmout, pmadd};
  endfunction

  // Expected outputs of phase ph for opcode o, with b/a the values read in
  // the two read phases and f the flags
  function automatic ctl_t want(input int ph, input logic [7:0] o, input logic [7:0] b,
                                input logic [7:0] a, input logic [7:0] f, input logic [7:0] res);
    ctl_t c = '0;
    logic cnd;
    case (o[2:0])
      0: cnd = 1; 1: cnd = f[1]; 2: cnd = !f[1]; 3: cnd = f[0];
      4: cnd = !f[0]; 5: cnd = f[2]; 6: cnd = f[3]; default: cnd = f[4];
    endcase
    case (ph)
      0: begin c.fetch = 1; c.pmr = 1; end
      1: case (o[7:6])
           2'b00: begin c.dmr = 1; c.dmadd = o[5] ? 5'd0 : o[4:0]; end
           2'b01: begin c.dmr = 1; c.dmadd = {2'b0, o[2:0]}; end
           2'b10: if (o[5:4] == 2'b00) begin c.dmr = 1; c.dmadd = 5'd2; end
           default: if (o[5]) begin c.dmr = 1; c.dmadd = o[4:0]; end
                    else begin c.pmr = 1; c.pmadd = {5'b0, o[4:0]}; end
         endcase
      2: if (o[7:6] == 2'b01 || (o[7:5] == 3'b111)) begin c.dmr = 1; c.dmadd = 5'd0; end
         else if (o[7:6] == 2'b10 && o[5:4] == 2'b00) begin c.dmr = 1; c.dmadd = 5'd3; end
      default: begin
        c.pcen = 1;
        case (o[7:6])
          2'b00: begin c.dmw = 1; c.dmadd = o[5] ? o[4:0] : 5'd0; c.dmout = b; end
          2'b01: begin c.dmw = 1; c.dmadd = 5'd0; c.dmout = res; c.alu_we = 1; end
          2'b10: begin
            c.pmadd = {a[1:0], b};
            case (o[5:3])
              0: c.jmp = cnd;
              1: c.call = cnd;
              2: c.ret = 1;
              3: begin c.ret = 1; c.ei = 1; end
              4: c.ei = 1;
              5: c.di = 1;
              default: ;
            endcase
          end
          default: if (o[5]) c.cmp_we = 1;
                   else begin c.dmw = 1; c.dmadd = 5'd0; c.dmout = b; end
        endcase
      end
    endcase
    return c;
  endfunction

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  // Runs one instruction: bus values per phase, returns nothing; checks every phase
  task automatic run(input logic [7:0] o, input logic [7:0] b, input logic [7:0] a,
                     input logic [7:0] f, input logic [7:0] res);
    ctl_t w;
    logic [7:0] bus [4];
    bus[0] = o; bus[1] = b; bus[2] = a; bus[3] = 8'($urandom);
    fin = f; alures = res;
    for (int ph = 0; ph < 4; ph++) begin
      op = bus[ph]; dmin = bus[ph];
      #1;
      w = want(ph, o, b, a, f, res);
      check(got() == w, $sformatf("phase %0d of opcode %b: got %p want %p", ph, o, got(), w));
      if (ph > 0) check(alusel == {(ph == 3) && (o[7:6] == 2'b01), o[5:3]}, "alusel");
      if (ph == 3 && (o[7:6] == 2'b01 || o[7:5] == 3'b111)) begin
        check(aluina == a && aluinb == b && aluinac == a && aluinbc == b, "ALU and comparator operands");
      end
      @(posedge clk); #1;
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    // MOV R0,R2 and LDA 01H as in the document's waveforms
    op = 8'b0000_0010; #1 check(pmr && !dmr && !dmw, "MOV: program read first");
    @(posedge clk); #1 dmin = 8'b1111_1010; op = dmin;
    check(!pmr && dmr && !dmw && dmadd == 5'b00010, "MOV: reads R2");
    @(posedge clk); #1 dmin = 8'h00; op = 8'h00;
    check(!pmr && !dmr && !dmw, "MOV: idle phase");
    @(posedge clk); #1 check(dmw && dmadd == 5'd0 && dmout == 8'b1111_1010 && pcen, "MOV: writes R0");
    @(posedge clk); #1 op = 8'b1100_0001; dmin = op;
    check(pmr && fetch, "LDA: program read first");
    @(posedge clk); #1 dmin = 8'b1010_1010; op = dmin;
    check(pmr && !fetch && pmadd == 10'b0000000001 && !dmw, "LDA: reads word 1");
    @(posedge clk); #1 dmin = 8'h00; op = 8'h00;
    @(posedge clk); #1 check(dmw && dmadd == 5'd0 && dmout == 8'b1010_1010 && pcen, "LDA: writes R0");
    @(posedge clk); #0;
    // random instructions
    for (int k = 0; k < 3000; k++)
      run(8'($urandom), 8'($urandom), 8'($urandom), 8'($urandom), 8'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
