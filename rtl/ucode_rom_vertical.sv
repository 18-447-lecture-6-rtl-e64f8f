// ucode_rom_vertical: the microprogram of ucode_rom in vertical form.
//
// Same addresses, steps and sequencing as the horizontal control store, but
// each word holds a uop (one bit per register transfer, rv_pkg::uop_t)
// instead of the individual control fields; uop_decoder turns it into the
// datapath controls. Purely combinational, read at the current uPC.
module ucode_rom_vertical
  import rv_pkg::*;
(
  input  logic [UPC_W-1:0] upc,
  output vinst_t           vinst
);
  always_comb begin
    uop_t  u;
    useq_e s;
    u = '0;
    s = SEQ_START;
    case (uaddr_e'(upc))
      U_FETCH:  begin u.ir_fetch = 1'b1; s = SEQ_NEXT; end
      U_DECODE: begin u.a_rs1 = 1'b1; u.b_rs2 = 1'b1; u.aluout_pc_imm = 1'b1;
                      s = SEQ_DISPATCH; end
      U_R_EX:   begin u.aluout_a_op_b = 1'b1; s = SEQ_NEXT; end
      U_I_EX:   begin u.aluout_a_op_imm = 1'b1; s = SEQ_NEXT; end
      U_R_WB, U_I_WB: begin u.rf_aluout = 1'b1; u.pc_plus4 = 1'b1; end
      U_LW_EA, U_SW_EA: begin u.aluout_a_imm = 1'b1; s = SEQ_NEXT; end
      U_LW_MEM: begin u.mdr_load = 1'b1; s = SEQ_NEXT; end
      U_LW_WB:  begin u.rf_mdr = 1'b1; u.pc_plus4 = 1'b1; end
      U_SW_MEM: begin u.mem_store = 1'b1; u.pc_plus4 = 1'b1; end
      U_BR_1:   begin u.pc_plus4 = 1'b1; s = SEQ_NEXT; end
      U_BR_2:   begin u.cond_ab = 1'b1; s = SEQ_START_IF_NCOND; end
      U_BR_3:   u.pc_aluout = 1'b1;
      U_JAL_1:  begin u.pc_aluout = 1'b1; u.aluout_pc_4 = 1'b1; s = SEQ_NEXT; end
      U_JAL_2:  u.rf_aluout = 1'b1;
      U_JALR_1: begin u.aluout_pc_4 = 1'b1; s = SEQ_NEXT; end
      U_JALR_2: begin u.pc_a_imm = 1'b1; u.rf_aluout = 1'b1; end
      default:  u.pc_plus4 = 1'b1;  // U_NOP and unused entries
    endcase
    vinst.uop = u;
    vinst.seq = s;
  end
endmodule
