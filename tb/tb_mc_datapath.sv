// tb_mc_datapath: drives the shared datapath with hand-written control
// words, one register-transfer step per cycle, for ADDI, SW, LW, ADD, a
// taken BEQ, JAL and JALR, and checks IR, PC, registers and memory after
// the steps. Idle cycles with every latch enable off must change nothing.
module tb_mc_datapath;
  import rv_pkg::*;
  import rv_tb_pkg::*;
  `include "tb_check.svh"
  logic clk = 0, rst_n = 0;
  uctrl_t ctrl = '0;
  logic [6:0] opcode;
  logic cond;
  logic [31:0] pc, ir;
  logic load_we = 0;
  logic [31:0] load_addr = 0, load_data = 0;
  logic [4:0] dbg_reg = 0;
  logic [31:0] dbg_reg_data, dbg_addr = 0, dbg_mem_data;
  mc_datapath dut (.*);
  always #5 clk = ~clk;

  task automatic step(input uctrl_t c);
    @(negedge clk) ctrl = c;
    @(posedge clk) #1 ctrl = '0;
  endtask
  logic [31:0] rv [32];
  task automatic snap();  // read every register through the debug port
    for (int r = 0; r < 32; r++) begin
      dbg_reg = 5'(r); #1 rv[r] = dbg_reg_data;
    end
  endtask

  // the common steps: IR <- MEM[PC]; A, B <- RF; ALUOut <- PC + imm
  task automatic fetch_decode();
    uctrl_t c = '0;
    c.ir_we = 1; c.maddr_src = MADDR_PC; step(c);
    c = '0; c.a_we = 1; c.b_we = 1; c.aluout_we = 1; c.alu_src1 = SRC1_PC;
    c.alu_src2 = SRC2_IMM; step(c);
  endtask
  function automatic uctrl_t pc4();
    uctrl_t c = '0;
    c.pc_we = 1; c.pc_src = PCSRC_ALU; c.alu_src1 = SRC1_PC; c.alu_src2 = SRC2_FOUR;
    return c;
  endfunction

  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("watchdog"); finish_tb();
  end
  initial begin
    logic [31:0] prog [$];
    uctrl_t c;
    prog = '{addi(1, 0, 5), addi(2, 0, 32'h100), enc_s(1, 2, 8), lw(3, 2, 8),
             enc_r(7'h20, 4, 3, 2, 3'b000), enc_b(3'b000, 1, 3, 8), addi(9, 0, 1),
             enc_j(6, 8), addi(9, 0, 2), jalr(7, 2, -4)};
    foreach (prog[i]) begin
      @(negedge clk); load_we = 1; load_addr = 4 * i; load_data = prog[i];
    end
    @(negedge clk) load_we = 0;
    rst_n = 1;
    // ADDI x1, x0, 5
    fetch_decode();
    check(ir == prog[0], "IR <- MEM[PC]");
    c = '0; c.aluout_we = 1; c.alu_src2 = SRC2_IMM; c.alu_mode = AM_FUNCT_I; step(c);
    c = pc4(); c.rf_we = 1; step(c);
    snap(); check(rv[1] == 5 && pc == 4, "ADDI");
    // idle cycles hold everything
    step('0); step('0);
    snap(); check(pc == 4 && ir == prog[0] && rv[1] == 5, "idle holds state");
    // ADDI x2, x0, 0x100
    fetch_decode();
    c = '0; c.aluout_we = 1; c.alu_src2 = SRC2_IMM; c.alu_mode = AM_FUNCT_I; step(c);
    c = pc4(); c.rf_we = 1; step(c);
    snap(); check(rv[2] == 32'h100 && pc == 8, "ADDI 2");
    // SW x1, 8(x2)
    fetch_decode();
    c = '0; c.aluout_we = 1; c.alu_src2 = SRC2_IMM; step(c);
    c = pc4(); c.mem_we = 1; c.maddr_src = MADDR_ALUOUT; step(c);
    dbg_addr = 32'h108; snap(); check(dbg_mem_data == 5 && pc == 12, "SW");
    // LW x3, 8(x2)
    fetch_decode();
    c = '0; c.aluout_we = 1; c.alu_src2 = SRC2_IMM; step(c);
    c = '0; c.mdr_we = 1; c.maddr_src = MADDR_ALUOUT; step(c);
    c = pc4(); c.rf_we = 1; c.rfdat_src = RFDAT_MDR; step(c);
    snap(); check(rv[3] == 5 && pc == 16, "LW");
    // SUB x4, x3, x2
    fetch_decode();
    c = '0; c.aluout_we = 1; c.alu_src2 = SRC2_B; c.alu_mode = AM_FUNCT_R; step(c);
    c = pc4(); c.rf_we = 1; step(c);
    snap(); check(rv[4] == 32'(5 - 32'h100) && pc == 20, "SUB");
    // BEQ x1, x3, +8 (taken)
    fetch_decode();
    step(pc4());
    @(negedge clk) ctrl = '0; snap(); check(cond == 1'b1, "cond?(A,B) true");
    @(posedge clk) #1;
    c = '0; c.pc_we = 1; c.pc_src = PCSRC_ALUOUT; step(c);
    snap(); check(pc == 28, "BEQ taken: PC <- ALUOut");
    // JAL x6, +8
    fetch_decode();
    c = '0; c.pc_we = 1; c.pc_src = PCSRC_ALUOUT; c.aluout_we = 1;
    c.alu_src1 = SRC1_PC; c.alu_src2 = SRC2_FOUR; step(c);
    c = '0; c.rf_we = 1; step(c);
    snap(); check(pc == 36 && rv[6] == 32, "JAL");
    // JALR x7, -4(x2)
    fetch_decode();
    c = '0; c.aluout_we = 1; c.alu_src1 = SRC1_PC; c.alu_src2 = SRC2_FOUR; step(c);
    c = '0; c.pc_we = 1; c.alu_src2 = SRC2_IMM; c.rf_we = 1; step(c);
    snap(); check(pc == 32'hfc && rv[7] == 40, "JALR");
    check(rv[9] == 0, "skipped instructions wrote nothing");
    finish_tb();
  end
endmodule
