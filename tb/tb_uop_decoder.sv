// tb_uop_decoder: each single register-transfer bit must produce exactly
// the expected enables and selects; then every uPC's vertical word, decoded,
// must equal the horizontal control word of the same microprogram step.
module tb_uop_decoder;
  import rv_pkg::*;
  `include "tb_check.svh"
  uop_t uop;
  uctrl_t ctrl, hctrl;
  logic [UPC_W-1:0] upc;
  vinst_t vinst;
  uinst_t uinst;
  uop_decoder dut (.uop, .ctrl);
  ucode_rom_vertical u_v (.upc, .vinst);
  ucode_rom u_h (.upc, .uinst);
  uop_decoder u_d2 (.uop(vinst.uop), .ctrl(hctrl));

  initial begin
    #100000 failures++; $display("watchdog"); finish_tb();
  end
  initial begin
    uctrl_t e;
    for (int b = 0; b < $bits(uop_t); b++) begin
      uop = uop_t'(16'h8000 >> b); #1;
      e = '0;
      case (b)
        0:  begin e.pc_we = 1; e.alu_src1 = SRC1_PC; e.alu_src2 = SRC2_FOUR; end
        1:  begin e.pc_we = 1; e.pc_src = PCSRC_ALUOUT; end
        2:  begin e.pc_we = 1; e.alu_src2 = SRC2_IMM; end
        3:  e.ir_we = 1;
        4:  e.a_we = 1;
        5:  e.b_we = 1;
        6:  begin e.aluout_we = 1; e.alu_src1 = SRC1_PC; e.alu_src2 = SRC2_IMM; end
        7:  begin e.aluout_we = 1; e.alu_mode = AM_FUNCT_R; end
        8:  begin e.aluout_we = 1; e.alu_src2 = SRC2_IMM; e.alu_mode = AM_FUNCT_I; end
        9:  begin e.aluout_we = 1; e.alu_src2 = SRC2_IMM; end
        10: begin e.aluout_we = 1; e.alu_src1 = SRC1_PC; e.alu_src2 = SRC2_FOUR; end
        11: begin e.mdr_we = 1; e.maddr_src = MADDR_ALUOUT; end
        12: begin e.mem_we = 1; e.maddr_src = MADDR_ALUOUT; end
        13: e.rf_we = 1;
        14: begin e.rf_we = 1; e.rfdat_src = RFDAT_MDR; end
        default: ;
      endcase
      check(ctrl == e, $sformatf("RT bit %0d: %h exp %h", b, ctrl, e));
    end
    for (int a = 0; a < 2 ** UPC_W; a++) begin
      upc = UPC_W'(a); #1;
      check(hctrl == uinst.ctrl && vinst.seq == uinst.seq,
            $sformatf("uPC %0d vertical %h horizontal %h", a, hctrl, uinst.ctrl));
    end
    finish_tb();
  end
endmodule
