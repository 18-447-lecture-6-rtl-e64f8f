// tb_mc1_datapath: the single-cycle datapath under a random MasterEn.
//
// The bench decodes the controls itself and raises master_en on random
// ticks. On a MasterEn tick the instruction must commit exactly as the
// reference model says (PC, destination register); on every other tick the
// PC and the destination register must not change, whatever the controls.
module tb_mc1_datapath;
  import rv_pkg::*;
  import rv_tb_pkg::*;
  `include "tb_check.svh"
  logic clk = 0, rst_n = 0, master_en = 0;
  sc_ctrl_t ctrl;
  logic [31:0] instr, pc;
  logic load_we = 0, load_imem = 1;
  logic [31:0] load_addr = 0, load_data = 0;
  logic [4:0] dbg_reg = 0;
  logic [31:0] dbg_reg_data, dbg_addr = 0, dbg_mem_data;
  mc1_datapath dut (.*);
  always #5 clk = ~clk;

  always_comb begin
    ctrl = '0;
    case (instr[6:0])
      7'h33: begin ctrl.reg_write = 1; ctrl.alu_mode = AM_FUNCT_R; end
      7'h13: begin ctrl.reg_write = 1; ctrl.alu_src_imm = 1; ctrl.alu_mode = AM_FUNCT_I; end
      7'h03: begin ctrl.reg_write = 1; ctrl.alu_src_imm = 1; ctrl.mem_to_reg = 1; end
      7'h23: begin ctrl.mem_write = 1; ctrl.alu_src_imm = 1; end
      7'h63: ctrl.branch = 1;
      7'h6f: begin ctrl.reg_write = 1; ctrl.link = 1; ctrl.jump = 1; end
      7'h67: begin ctrl.reg_write = 1; ctrl.link = 1; ctrl.jalr = 1; ctrl.alu_src_imm = 1; end
      default: ;
    endcase
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog"); finish_tb();
  end

  logic [31:0] prog [$];
  rv_iss iss;
  initial begin
    int halt_pc, rdn, n;
    logic [31:0] old_pc, old_rd, ins;
    void'($urandom(5));
    gen_program(prog, 40);
    halt_pc = (prog.size() - 1) * 4;
    iss = new();
    foreach (prog[i]) iss.mem[i] = prog[i];
    foreach (prog[i]) begin
      @(negedge clk); load_we = 1; load_addr = 4 * i; load_data = prog[i];
    end
    @(negedge clk) load_we = 0;
    rst_n = 1;
    n = 0;
    while (!(iss.pc == halt_pc && n > 5)) begin
      @(negedge clk);
      master_en = ($urandom_range(0, 2) == 0);
      dbg_reg = instr[11:7];
      #1;
      old_pc = pc; old_rd = dbg_reg_data;
      if (master_en) begin
        ins = iss.step();
        check(instr == ins, $sformatf("instr %h exp %h", instr, ins));
        rdn = iss.last_rd;
        n++;
      end
      @(posedge clk); #1;
      if (master_en) begin
        check(pc == iss.pc, $sformatf("pc %h exp %h", pc, iss.pc));
        dbg_reg = 5'(rdn); #1;
        check(dbg_reg_data == iss.x[rdn], $sformatf("x%0d", rdn));
      end else begin
        check(pc == old_pc, "PC held without MasterEn");
        check(dbg_reg_data == old_rd, "RF held without MasterEn");
      end
    end
    for (int r = 0; r < 32; r++) begin
      dbg_reg = 5'(r); #1;
      check(dbg_reg_data == iss.x[r], $sformatf("final x%0d", r));
    end
    finish_tb();
  end
endmodule
