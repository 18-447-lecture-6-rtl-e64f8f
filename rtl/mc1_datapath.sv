// mc1_datapath: single-cycle RV32 datapath with a MasterEn gate (Ver 1.0).
//
// Everything between two architectural states is combinational: PC indexes
// the instruction memory, the instruction reads rs1/rs2 from the register
// file, the ALU works on rs1 and rs2 or imm(IR), the data memory is read at
// the ALU result, and the next PC is PC+4, PC+imm (taken branch, JAL) or
// (rs1+imm)&~1 (JALR). The write-back value is the ALU result, the loaded
// word (MemtoReg) or PC+4 (link). PC, register-file and data-memory writes
// happen on a rising edge only when master_en is 1, so a slow instruction
// can take many fast clock ticks while its combinational paths settle; all
// other controls are unchanged from the single-cycle design. Structure and
// MasterEn follow the lecture; separate instruction and data memories follow
// its single-cycle figure. The instruction memory is written only through
// the load port (load_imem=1), the data memory through SW or the load port.
module mc1_datapath
  import rv_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 1024,
  parameter int unsigned DMEM_WORDS = 1024
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        master_en,
  input  sc_ctrl_t    ctrl,
  output logic [31:0] instr,
  output logic [31:0] pc,
  input  logic        load_we,
  input  logic        load_imem,
  input  logic [31:0] load_addr,
  input  logic [31:0] load_data,
  input  logic [4:0]  dbg_reg,
  output logic [31:0] dbg_reg_data,
  input  logic [31:0] dbg_addr,
  output logic [31:0] dbg_mem_data
);
  logic [31:0] rd1, rd2, imm, src2, alu_y, dmem_rdata, wb, pc_plus4, pc_next;
  logic [31:0] unused_imem_dbg;
  logic        cond;
  alu_op_e     op;

  memory #(.WORDS(IMEM_WORDS)) u_imem (
    .clk, .addr(pc), .rdata(instr), .we(1'b0), .wdata('0),
    .load_we(load_we & load_imem), .load_addr, .load_data,
    .dbg_addr('0), .dbg_data(unused_imem_dbg)
  );

  regfile u_rf (
    .clk, .rst_n, .rs1(instr[19:15]), .rs2(instr[24:20]), .rd1, .rd2,
    .we(ctrl.reg_write & master_en), .rd(instr[11:7]), .wd(wb),
    .dbg_addr(dbg_reg), .dbg_data(dbg_reg_data)
  );

  imm_gen u_imm (.ir(instr), .imm);

  assign src2 = ctrl.alu_src_imm ? imm : rd2;
  always_comb begin
    case (ctrl.alu_mode)
      AM_FUNCT_R: op = funct_to_op(instr[14:12], instr[30], 1'b1);
      AM_FUNCT_I: op = funct_to_op(instr[14:12], instr[30] & (instr[14:12] == 3'b101), 1'b0);
      default:    op = ALU_ADD;
    endcase
  end

  // branches use the register operand (ALUSrc=0), so the ALU's condition
  // output (bcond) compares rs1 with rs2
  alu u_alu (.a(rd1), .b(src2), .op, .br_f3(instr[14:12]), .y(alu_y), .cond);

  memory #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk, .addr(alu_y), .rdata(dmem_rdata), .we(ctrl.mem_write & master_en),
    .wdata(rd2), .load_we(load_we & ~load_imem), .load_addr, .load_data,
    .dbg_addr, .dbg_data(dbg_mem_data)
  );

  assign pc_plus4 = pc + 32'd4;
  assign wb = ctrl.link ? pc_plus4 : (ctrl.mem_to_reg ? dmem_rdata : alu_y);

  always_comb begin
    if (ctrl.jalr)                         pc_next = {alu_y[31:1], 1'b0};
    else if (ctrl.jump || (ctrl.branch && cond)) pc_next = pc + imm;
    else                                   pc_next = pc_plus4;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         pc <= '0;
    else if (master_en) pc <= pc_next;
  end
endmodule
