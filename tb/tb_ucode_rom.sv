// tb_ucode_rom: walks the microprogram. Every microinstruction is turned
// back into the register transfers it performs (read off its control
// fields) and its sequencing action; the walk from each dispatch target
// must give exactly the expected register-transfer steps of that
// instruction, ending in "start". Unused entries must return to fetch.
module tb_ucode_rom;
  import rv_pkg::*;
  `include "tb_check.svh"
  logic [UPC_W-1:0] upc;
  uinst_t uinst;
  ucode_rom dut (.*);

  function automatic string s1(uctrl_t c);
    return c.alu_src1 == SRC1_PC ? "PC" : "A";
  endfunction
  function automatic string s2(uctrl_t c);
    case (c.alu_src2)
      SRC2_IMM: return "imm";
      SRC2_FOUR: return "4";
      default: return "B";
    endcase
  endfunction
  function automatic string alu_expr(uctrl_t c);
    return {s1(c), (c.alu_mode == AM_ADD) ? "+" : " op ", s2(c)};
  endfunction
  function automatic string maddr(uctrl_t c);
    return c.maddr_src == MADDR_ALUOUT ? "ALUOut" : "PC";
  endfunction

  function automatic string rts(uinst_t u);
    string parts [$];
    string r;
    uctrl_t c = u.ctrl;
    if (c.pc_we) parts.push_back(c.pc_src == PCSRC_ALUOUT ? "PC<-ALUOut" : {"PC<-", alu_expr(c)});
    if (c.ir_we) parts.push_back({"IR<-MEM[", maddr(c), "]"});
    if (c.mdr_we) parts.push_back({"MDR<-MEM[", maddr(c), "]"});
    if (c.mem_we) parts.push_back({"MEM[", maddr(c), "]<-B"});
    if (c.a_we) parts.push_back("A<-RF[rs1]");
    if (c.b_we) parts.push_back("B<-RF[rs2]");
    if (c.aluout_we) parts.push_back({"ALUOut<-", alu_expr(c)});
    if (c.rf_we) parts.push_back({"RF[rd]<-", c.rfdat_src == RFDAT_MDR ? "MDR" : "ALUOut"});
    if (u.seq == SEQ_START_IF_NCOND) parts.push_back({"cond(", s1(c), ",", s2(c), ")"});
    r = "";
    foreach (parts[i]) r = {r, (i == 0) ? "" : "; ", parts[i]};
    case (u.seq)
      SEQ_NEXT: r = {r, " /next"};
      SEQ_DISPATCH: r = {r, " /case"};
      SEQ_START: r = {r, " /start"};
      default: r = {r, " /start-if-not-cond"};
    endcase
    return r;
  endfunction

  task automatic walk(input int start, input string exp [$], input string name);
    int a = start;
    foreach (exp[i]) begin
      upc = UPC_W'(a); #1;
      check(rts(uinst) == exp[i], $sformatf("%s step %0d: '%s' exp '%s'", name, i, rts(uinst), exp[i]));
      a++;
    end
  endtask

  initial begin
    #100000 failures++; $display("watchdog"); finish_tb();
  end
  initial begin
    walk(U_FETCH, '{"IR<-MEM[PC] /next", "A<-RF[rs1]; B<-RF[rs2]; ALUOut<-PC+imm /case"}, "common");
    walk(U_R_EX, '{"ALUOut<-A op B /next", "PC<-PC+4; RF[rd]<-ALUOut /start"}, "R");
    walk(U_I_EX, '{"ALUOut<-A op imm /next", "PC<-PC+4; RF[rd]<-ALUOut /start"}, "I");
    walk(U_LW_EA, '{"ALUOut<-A+imm /next", "MDR<-MEM[ALUOut] /next",
                    "PC<-PC+4; RF[rd]<-MDR /start"}, "LW");
    walk(U_SW_EA, '{"ALUOut<-A+imm /next", "PC<-PC+4; MEM[ALUOut]<-B /start"}, "SW");
    walk(U_BR_1, '{"PC<-PC+4 /next", "cond(A,B) /start-if-not-cond", "PC<-ALUOut /start"}, "Bxx");
    walk(U_JAL_1, '{"PC<-ALUOut; ALUOut<-PC+4 /next", "RF[rd]<-ALUOut /start"}, "JAL");
    walk(U_JALR_1, '{"ALUOut<-PC+4 /next", "PC<-A+imm; RF[rd]<-ALUOut /start"}, "JALR");
    walk(U_NOP, '{"PC<-PC+4 /start"}, "NOP");
    for (int a = U_NOP + 1; a < 2 ** UPC_W; a++) begin
      upc = UPC_W'(a); #1;
      check(uinst.seq == SEQ_START && !uinst.ctrl.rf_we && !uinst.ctrl.mem_we, "unused entry");
    end
    finish_tb();
  end
endmodule
