// uop_decoder: expands a vertical microinstruction into datapath controls.
//
// In the vertical format each bit of the m-bit uop names one register
// transfer (PC <- PC+4, IR <- MEM[PC], ALUOut <- A+imm, ...); this block is
// the m-bit-in, k-bit-out table that turns the set of requested transfers
// into the latch enables and steering selects of the horizontal word
// (rv_pkg::uctrl_t). The lecture draws it as a ROM; it is written here as
// the equivalent combinational logic, since a literal 2^16-row table would
// hold mostly unusable combinations. A uop may only combine transfers that
// use each resource (ALU, memory port, register-file write port) once; the
// assertion flags two ALU users in one step. Purely combinational.
module uop_decoder
  import rv_pkg::*;
(
  input  uop_t   uop,
  output uctrl_t ctrl
);
  always_comb begin
    ctrl = '0;
    if (uop.pc_plus4 || uop.aluout_pc_4) begin
      ctrl.alu_src1 = SRC1_PC; ctrl.alu_src2 = SRC2_FOUR;
    end
    if (uop.aluout_pc_imm) begin ctrl.alu_src1 = SRC1_PC; ctrl.alu_src2 = SRC2_IMM; end
    if (uop.aluout_a_op_b) ctrl.alu_mode = AM_FUNCT_R;
    if (uop.aluout_a_op_imm) begin ctrl.alu_src2 = SRC2_IMM; ctrl.alu_mode = AM_FUNCT_I; end
    if (uop.aluout_a_imm || uop.pc_a_imm) ctrl.alu_src2 = SRC2_IMM;
    if (uop.pc_plus4 || uop.pc_a_imm) begin ctrl.pc_we = 1'b1; ctrl.pc_src = PCSRC_ALU; end
    if (uop.pc_aluout) begin ctrl.pc_we = 1'b1; ctrl.pc_src = PCSRC_ALUOUT; end
    if (uop.ir_fetch) begin ctrl.ir_we = 1'b1; ctrl.maddr_src = MADDR_PC; end
    if (uop.a_rs1) ctrl.a_we = 1'b1;
    if (uop.b_rs2) ctrl.b_we = 1'b1;
    if (uop.aluout_pc_imm || uop.aluout_a_op_b || uop.aluout_a_op_imm ||
        uop.aluout_a_imm || uop.aluout_pc_4) ctrl.aluout_we = 1'b1;
    if (uop.mdr_load) begin ctrl.mdr_we = 1'b1; ctrl.maddr_src = MADDR_ALUOUT; end
    if (uop.mem_store) begin ctrl.mem_we = 1'b1; ctrl.maddr_src = MADDR_ALUOUT; end
    if (uop.rf_aluout) begin ctrl.rf_we = 1'b1; ctrl.rfdat_src = RFDAT_ALUOUT; end
    if (uop.rf_mdr) begin ctrl.rf_we = 1'b1; ctrl.rfdat_src = RFDAT_MDR; end
  end

  // each resource once per step: at most one ALU user
  always_comb begin
    assert ($countones({uop.pc_plus4, uop.pc_a_imm, uop.aluout_pc_imm, uop.aluout_a_op_b,
                        uop.aluout_a_op_imm, uop.aluout_a_imm, uop.aluout_pc_4,
                        uop.cond_ab}) <= 1)
      else $error("uop uses the ALU twice");
  end
endmodule
