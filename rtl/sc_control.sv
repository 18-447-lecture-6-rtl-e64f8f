// sc_control: main control of the single-cycle (Ver 1.0) datapath.
//
// Purely combinational decode of the 7-bit opcode into the datapath controls
// (RegWrite, MemWrite, ALUSrc, MemtoReg, Branch, Jump, plus JALR and link
// selects and how the ALU operation is chosen) and into the instruction
// class that the tick-counting sequencer uses. The signal names follow the
// lecture's single-cycle datapath figure; their values for each RV32
// instruction are the usual ones and are this design's own table. Opcodes
// outside the subset write nothing and fall through to PC+4.
module sc_control
  import rv_pkg::*;
(
  input  logic [6:0] opcode,
  output sc_ctrl_t   ctrl,
  output iclass_e    iclass
);
  always_comb begin
    ctrl = '0;
    case (opcode)
      OP_R:      begin ctrl.reg_write = 1'b1; ctrl.alu_mode = AM_FUNCT_R; end
      OP_I:      begin ctrl.reg_write = 1'b1; ctrl.alu_src_imm = 1'b1;
                       ctrl.alu_mode = AM_FUNCT_I; end
      OP_LOAD:   begin ctrl.reg_write = 1'b1; ctrl.alu_src_imm = 1'b1;
                       ctrl.mem_to_reg = 1'b1; end
      OP_STORE:  begin ctrl.mem_write = 1'b1; ctrl.alu_src_imm = 1'b1; end
      OP_BRANCH: begin ctrl.branch = 1'b1; end
      OP_JAL:    begin ctrl.reg_write = 1'b1; ctrl.link = 1'b1; ctrl.jump = 1'b1; end
      OP_JALR:   begin ctrl.reg_write = 1'b1; ctrl.link = 1'b1; ctrl.jalr = 1'b1;
                       ctrl.alu_src_imm = 1'b1; end
      default:   ;
    endcase
    iclass = classify(opcode);
  end
endmodule
