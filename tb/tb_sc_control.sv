// tb_sc_control: every opcode of the subset plus random others, checked
// against the expected control settings and instruction class.
module tb_sc_control;
  import rv_pkg::*;
  `include "tb_check.svh"
  logic [6:0] opcode;
  sc_ctrl_t ctrl;
  iclass_e iclass;
  sc_control dut (.*);
  initial begin
    #100000 failures++; $display("watchdog"); finish_tb();
  end
  initial begin
    // {reg_write, mem_write, alu_src_imm, mem_to_reg, link, branch, jump, jalr}
    logic [7:0] exp;
    iclass_e ecl;
    for (int k = 0; k < 128; k++) begin
      opcode = 7'(k); #1;
      case (opcode)
        7'h33: begin exp = 8'b1000_0000; ecl = CL_RI; end
        7'h13: begin exp = 8'b1010_0000; ecl = CL_RI; end
        7'h03: begin exp = 8'b1011_0000; ecl = CL_LW; end
        7'h23: begin exp = 8'b0110_0000; ecl = CL_SW; end
        7'h63: begin exp = 8'b0000_0100; ecl = CL_BXX; end
        7'h6f: begin exp = 8'b1000_1010; ecl = CL_JAL; end
        7'h67: begin exp = 8'b1010_1001; ecl = CL_JALR; end
        default: begin exp = 8'b0; ecl = CL_OTHER; end
      endcase
      check({ctrl.reg_write, ctrl.mem_write, ctrl.alu_src_imm, ctrl.mem_to_reg,
             ctrl.link, ctrl.branch, ctrl.jump, ctrl.jalr} == exp,
            $sformatf("opcode %h controls", opcode));
      check(iclass == ecl, $sformatf("opcode %h class", opcode));
      if (opcode == 7'h33) check(ctrl.alu_mode == AM_FUNCT_R, "R alu mode");
      if (opcode == 7'h13) check(ctrl.alu_mode == AM_FUNCT_I, "I alu mode");
      if (opcode == 7'h03) check(ctrl.alu_mode == AM_ADD, "LW alu mode");
    end
    finish_tb();
  end
endmodule
