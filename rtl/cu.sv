// cu: control unit of the processor.
//
// Every instruction takes four clock cycles, the phases of cpu_pkg::phase_e:
//   FETCH  pmr high, program address = PC (fetch high); op is latched.
//   RDB    read the second operand into latch B: register Rn with dmr
//          (MOV, ALU, CMP), R0 (MOV Rn,R0), program word a with pmr and
//          pmadd = a (LDA), or R2, the low jump target (JMP, CALL).
//   RDA    read R0 into latch A (ALU, CMP) or R3, the high jump target.
//   WR     dmw writes R0 or Rn; alu_we / cmp_we load the flags; jmp, call,
//          ret go to the PC with pmadd = {A[1:0], B} as target; ei / di
//          go to the interrupt block; pcen steps the PC.
// Latches A and B drive the ALU (aluina, aluinb) and the comparator
// (aluinac, aluinbc); alusel is {ALU enable, ALU select}. Outputs that are
// not in use are 0. The phase order (program read, data read, data write),
// the port names, and the codes of MOV R0,R2 and LDA 01H follow the source
// document; the four-phase split, the rest of the opcode map (see cpu_pkg)
// and the added ports fetch, pcen, alu_we, cmp_we, ei and di are this
// design's. Synchronous reset restarts at FETCH.
module cu
  import cpu_pkg::*;
(
  input  logic            clk,
  input  logic            rst,
  input  logic [DW-1:0]   op,
  input  logic [DW-1:0]   dmin,
  input  logic [DW-1:0]   alures,
  input  logic [7:0]      fin,
  output logic [DW-1:0]   aluina,
  output logic [DW-1:0]   aluinac,
  output logic [DW-1:0]   aluinb,
  output logic [DW-1:0]   aluinbc,
  output logic [3:0]      alusel,
  output logic [RW-1:0]   dmadd,
  output logic [DW-1:0]   dmout,
  output logic [AW-1:0]   pmadd,
  output logic            call,
  output logic            dmr,
  output logic            dmw,
  output logic            jmp,
  output logic            pmr,
  output logic            ret,
  output logic            fetch,
  output logic            pcen,
  output logic            alu_we,
  output logic            cmp_we,
  output logic            ei,
  output logic            di
);

  phase_e         phase;
  logic [DW-1:0]  ir, areg, breg;

  // Decoded fields of the latched opcode
  op_class_e      cls;
  ctl_fn_e        fn;
  logic [RW-1:0]  n5;
  logic [RW-1:0]  n3;
  logic           is_mov_to0, is_mov_from0, is_alu, is_lda, is_cmp, is_ctl;
  logic           is_jmp, is_call, is_jc, cond_ok;

  always_comb begin
    cls          = op_class_e'(ir[7:6]);
    fn           = ctl_fn_e'(ir[5:3]);
    n5           = ir[4:0];
    n3           = {2'b00, ir[2:0]};
    is_mov_to0   = (cls == CLS_MOV) && !ir[5];
    is_mov_from0 = (cls == CLS_MOV) &&  ir[5];
    is_alu       = (cls == CLS_ALU);
    is_lda       = (cls == CLS_MEM) && !ir[5];
    is_cmp       = (cls == CLS_MEM) &&  ir[5];
    is_ctl       = (cls == CLS_CTL);
    is_jmp       = is_ctl && (fn == CTL_JMP);
    is_call      = is_ctl && (fn == CTL_CALL);
    is_jc        = is_jmp || is_call;
    unique case (cond_e'(ir[2:0]))
      CC_AL: cond_ok = 1'b1;
      CC_Z : cond_ok =  fin[F_Z];
      CC_NZ: cond_ok = !fin[F_Z];
      CC_C : cond_ok =  fin[F_C];
      CC_NC: cond_ok = !fin[F_C];
      CC_EQ: cond_ok =  fin[F_EQ];
      CC_GT: cond_ok =  fin[F_GT];
      CC_LT: cond_ok =  fin[F_LT];
    endcase
  end

  // Strobes and addresses of each phase
  always_comb begin
    fetch  = 1'b0;  pmr    = 1'b0;  dmr    = 1'b0;  dmw   = 1'b0;
    dmadd  = '0;    dmout  = '0;    pmadd  = '0;
    jmp    = 1'b0;  call   = 1'b0;  ret    = 1'b0;  pcen  = 1'b0;
    alu_we = 1'b0;  cmp_we = 1'b0;  ei     = 1'b0;  di    = 1'b0;
    alusel = {1'b0, ir[5:3]};
    unique case (phase)
      PH_FETCH: begin
        fetch = 1'b1;
        pmr   = 1'b1;
      end
      PH_RDB: begin
        if (is_lda) begin
          pmr   = 1'b1;
          pmadd = {{(AW-RW){1'b0}}, n5};
        end else if (is_mov_to0 || is_cmp) begin
          dmr   = 1'b1;
          dmadd = n5;
        end else if (is_mov_from0) begin
          dmr   = 1'b1;
          dmadd = '0;
        end else if (is_alu) begin
          dmr   = 1'b1;
          dmadd = n3;
        end else if (is_jc) begin
          dmr   = 1'b1;
          dmadd = R_TGT_LO;
        end
      end
      PH_RDA: begin
        if (is_alu || is_cmp) begin
          dmr   = 1'b1;
          dmadd = '0;
        end else if (is_jc) begin
          dmr   = 1'b1;
          dmadd = R_TGT_HI;
        end
      end
      PH_WR: begin
        pcen = 1'b1;
        if (is_mov_to0 || is_lda) begin
          dmw   = 1'b1;
          dmadd = '0;
          dmout = breg;
        end else if (is_mov_from0) begin
          dmw   = 1'b1;
          dmadd = n5;
          dmout = breg;
        end else if (is_alu) begin
          alusel = {1'b1, ir[5:3]};
          dmw    = 1'b1;
          dmadd  = '0;
          dmout  = alures;
          alu_we = 1'b1;
        end else if (is_cmp) begin
          cmp_we = 1'b1;
        end else if (is_ctl) begin
          pmadd = {areg[AW-DW-1:0], breg};
          unique case (fn)
            CTL_JMP : jmp  = cond_ok;
            CTL_CALL: call = cond_ok;
            CTL_RET : ret  = 1'b1;
            CTL_RETI: begin ret = 1'b1; ei = 1'b1; end
            CTL_EI  : ei   = 1'b1;
            CTL_DI  : di   = 1'b1;
            default : ;
          endcase
        end
      end
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      phase <= PH_FETCH;
      ir    <= '0;
      areg  <= '0;
      breg  <= '0;
    end else begin
      phase <= phase_e'(phase + 2'd1);
      if (phase == PH_FETCH) ir <= op;
      if (phase == PH_RDB)   breg <= dmin;
      if (phase == PH_RDA)   areg <= dmin;
    end
  end

  assign aluina  = areg;
  assign aluinb  = breg;
  assign aluinac = areg;
  assign aluinbc = breg;

  a_one_reader: assert property (@(posedge clk) disable iff (rst) !(pmr && dmr));
  a_one_pc_op:  assert property (@(posedge clk) disable iff (rst) $onehot0({jmp, call, ret}));

endmodule
