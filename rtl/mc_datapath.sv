// mc_datapath: the shared-resource multi-cycle datapath.
//
// One memory port serves both instruction fetch and data access, and one
// ALU serves every addition (PC+4, branch target, effective address) and
// every R/I operation. Values that must survive from one cycle to the next
// sit in the synchronous state registers PC, IR, MDR, A, B and ALUOut, each
// written on the rising edge only when its latch enable in `ctrl` is 1. The
// steering muxes are: ALU input 1 from A or PC, ALU input 2 from B, imm(IR)
// or the constant 4, memory address from PC or ALUOut (IorD), register-file
// write data from ALUOut or MDR, and new PC from the ALU result or ALUOut.
// Every control input is used once per cycle, so one cycle carries out one
// set of compatible register transfers. The register set and steering follow
// the lecture; the PC mux input from the ALU (for PC <- PC+4 and JALR's
// PC <- A+imm) clears bit 0 as RV32I JALR requires, which is this design's
// detail. `opcode` and `cond` go back to the microsequencer.
//
// Ports load_* write the memory while the core is held in reset; dbg_* read
// the register file and the memory for test benches.
module mc_datapath
  import rv_pkg::*;
#(
  parameter int unsigned MEM_WORDS = 1024
) (
  input  logic        clk,
  input  logic        rst_n,
  input  uctrl_t      ctrl,
  output logic [6:0]  opcode,
  output logic        cond,
  output logic [31:0] pc,
  output logic [31:0] ir,
  input  logic        load_we,
  input  logic [31:0] load_addr,
  input  logic [31:0] load_data,
  input  logic [4:0]  dbg_reg,
  output logic [31:0] dbg_reg_data,
  input  logic [31:0] dbg_addr,
  output logic [31:0] dbg_mem_data
);
  logic [31:0] mdr, a, b, aluout;
  logic [31:0] rd1, rd2, imm, mem_addr, mem_rdata, rf_wd, src1, src2, alu_y;
  alu_op_e     op;

  // steering
  assign mem_addr = (ctrl.maddr_src == MADDR_ALUOUT) ? aluout : pc;
  assign rf_wd    = (ctrl.rfdat_src == RFDAT_MDR) ? mdr : aluout;
  assign src1     = (ctrl.alu_src1 == SRC1_PC) ? pc : a;
  always_comb begin
    case (ctrl.alu_src2)
      SRC2_IMM:  src2 = imm;
      SRC2_FOUR: src2 = 32'd4;
      default:   src2 = b;
    endcase
  end
  always_comb begin
    case (ctrl.alu_mode)
      AM_FUNCT_R: op = funct_to_op(ir[14:12], ir[30], 1'b1);
      // I-type: funct7 bit 30 only selects SRAI among the shifts
      AM_FUNCT_I: op = funct_to_op(ir[14:12], ir[30] & (ir[14:12] == 3'b101), 1'b0);
      default:    op = ALU_ADD;
    endcase
  end

  memory #(.WORDS(MEM_WORDS)) u_mem (
    .clk, .addr(mem_addr), .rdata(mem_rdata), .we(ctrl.mem_we), .wdata(b),
    .load_we, .load_addr, .load_data, .dbg_addr, .dbg_data(dbg_mem_data)
  );

  regfile u_rf (
    .clk, .rst_n, .rs1(ir[19:15]), .rs2(ir[24:20]), .rd1, .rd2,
    .we(ctrl.rf_we), .rd(ir[11:7]), .wd(rf_wd),
    .dbg_addr(dbg_reg), .dbg_data(dbg_reg_data)
  );

  imm_gen u_imm (.ir, .imm);

  alu u_alu (.a(src1), .b(src2), .op, .br_f3(ir[14:12]), .y(alu_y), .cond);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc <= '0; ir <= '0; mdr <= '0; a <= '0; b <= '0; aluout <= '0;
    end else begin
      if (ctrl.pc_we)
        pc <= (ctrl.pc_src == PCSRC_ALUOUT) ? aluout : {alu_y[31:1], 1'b0};
      if (ctrl.ir_we)     ir     <= mem_rdata;
      if (ctrl.mdr_we)    mdr    <= mem_rdata;
      if (ctrl.a_we)      a      <= rd1;
      if (ctrl.b_we)      b      <= rd2;
      if (ctrl.aluout_we) aluout <= alu_y;
    end
  end

  assign opcode = ir[6:0];

  // one memory access per cycle: a write never coincides with a fetch
  assert property (@(posedge clk) disable iff (!rst_n)
                   ctrl.mem_we |-> (ctrl.maddr_src == MADDR_ALUOUT) && !ctrl.ir_we);
endmodule
