// ucode_rom: the microcode storage of the microprogrammed core.
//
// A 2^UPC_W-entry read-only table, read combinationally at the current uPC,
// whose word is one horizontal microinstruction: one field per latch enable
// and steering control of the shared datapath, plus a 2-bit sequencing
// field. The microprogram follows the lecture's combined register-transfer
// sequencing (common fetch and decode steps, then per-opcode steps):
//
//   FETCH   IR <- MEM[PC]                                    next
//   DECODE  A <- RF[rs1]; B <- RF[rs2]; ALUOut <- PC+imm     case opcode
//   R       ALUOut <- A op B              | RF[rd] <- ALUOut; PC <- PC+4
//   I       ALUOut <- A op imm            | RF[rd] <- ALUOut; PC <- PC+4
//   LW      ALUOut <- A+imm | MDR <- MEM[ALUOut] | RF[rd] <- MDR; PC <- PC+4
//   SW      ALUOut <- A+imm | MEM[ALUOut] <- B; PC <- PC+4
//   Bxx     PC <- PC+4 | cond?(A,B), start if not | PC <- ALUOut
//   JAL     PC <- ALUOut; ALUOut <- PC+4 | RF[rd] <- ALUOut
//   JALR    ALUOut <- PC+4 | PC <- A+imm; RF[rd] <- ALUOut
//
// The JAL and JALR link writes (rd <- PC+4) and the NOP entry used for
// opcodes outside the subset are this design's additions; the field
// encoding is this design's own. Unused entries hold the NOP word.
module ucode_rom
  import rv_pkg::*;
(
  input  logic [UPC_W-1:0] upc,
  output uinst_t           uinst
);
  // PC <- PC + 4 through the ALU
  function automatic uctrl_t pc_plus4(input uctrl_t c);
    uctrl_t r = c;
    r.pc_we    = 1'b1;
    r.pc_src   = PCSRC_ALU;
    r.alu_src1 = SRC1_PC;
    r.alu_src2 = SRC2_FOUR;
    r.alu_mode = AM_ADD;
    return r;
  endfunction

  always_comb begin
    uctrl_t c;
    useq_e  s;
    c = '0;           // all enables off, every mux on its 0 input, add
    s = SEQ_START;
    case (uaddr_e'(upc))
      U_FETCH: begin
        c.ir_we = 1'b1; c.maddr_src = MADDR_PC; s = SEQ_NEXT;
      end
      U_DECODE: begin
        c.a_we = 1'b1; c.b_we = 1'b1;
        c.aluout_we = 1'b1; c.alu_src1 = SRC1_PC; c.alu_src2 = SRC2_IMM;
        s = SEQ_DISPATCH;
      end
      U_R_EX: begin
        c.aluout_we = 1'b1; c.alu_src2 = SRC2_B; c.alu_mode = AM_FUNCT_R;
        s = SEQ_NEXT;
      end
      U_I_EX: begin
        c.aluout_we = 1'b1; c.alu_src2 = SRC2_IMM; c.alu_mode = AM_FUNCT_I;
        s = SEQ_NEXT;
      end
      U_R_WB, U_I_WB: begin
        c = pc_plus4(c); c.rf_we = 1'b1; c.rfdat_src = RFDAT_ALUOUT;
      end
      U_LW_EA, U_SW_EA: begin
        c.aluout_we = 1'b1; c.alu_src2 = SRC2_IMM; s = SEQ_NEXT;
      end
      U_LW_MEM: begin
        c.mdr_we = 1'b1; c.maddr_src = MADDR_ALUOUT; s = SEQ_NEXT;
      end
      U_LW_WB: begin
        c = pc_plus4(c); c.rf_we = 1'b1; c.rfdat_src = RFDAT_MDR;
      end
      U_SW_MEM: begin
        c = pc_plus4(c); c.mem_we = 1'b1; c.maddr_src = MADDR_ALUOUT;
      end
      U_BR_1: begin
        c = pc_plus4(c); s = SEQ_NEXT;
      end
      U_BR_2: begin
        c.alu_src2 = SRC2_B; s = SEQ_START_IF_NCOND;
      end
      U_BR_3: begin
        c.pc_we = 1'b1; c.pc_src = PCSRC_ALUOUT;
      end
      U_JAL_1: begin
        c.pc_we = 1'b1; c.pc_src = PCSRC_ALUOUT;
        c.aluout_we = 1'b1; c.alu_src1 = SRC1_PC; c.alu_src2 = SRC2_FOUR;
        s = SEQ_NEXT;
      end
      U_JAL_2: begin
        c.rf_we = 1'b1; c.rfdat_src = RFDAT_ALUOUT;
      end
      U_JALR_1: begin
        c.aluout_we = 1'b1; c.alu_src1 = SRC1_PC; c.alu_src2 = SRC2_FOUR;
        s = SEQ_NEXT;
      end
      U_JALR_2: begin
        c.pc_we = 1'b1; c.pc_src = PCSRC_ALU; c.alu_src2 = SRC2_IMM;
        c.rf_we = 1'b1; c.rfdat_src = RFDAT_ALUOUT;
      end
      default: begin  // U_NOP and unused entries: skip the instruction
        c = pc_plus4(c);
      end
    endcase
    uinst.ctrl = c;
    uinst.seq  = s;
  end
endmodule
