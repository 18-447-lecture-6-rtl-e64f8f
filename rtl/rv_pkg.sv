// rv_pkg: types and constants shared by both multi-cycle cores.
//
// The instruction set is the RV32I subset the lecture sequences: R-type and
// I-type ALU operations, LW, SW, the conditional branches (Bxx), JAL and JALR.
// Opcode values are the standard RV32I ones. The horizontal microinstruction
// format (uctrl_t) and the sequencing field (useq_e) are this design's own
// encoding of the latch enables and steering signals the lecture lists:
// latch enables PC, IR, MDR, A, B, ALUOut, RegWr, MemWr and steering
// ALUSrc1{RF,PC}, ALUSrc2{RF,immed}, MAddrSrc{PC,ALUOut}, RFDatSrc{ALUOut,MDR}.
package rv_pkg;


  // RV32I major opcodes used here
  localparam logic [6:0] OP_R      = 7'b0110011;
  localparam logic [6:0] OP_I      = 7'b0010011;
  localparam logic [6:0] OP_LOAD   = 7'b0000011;
  localparam logic [6:0] OP_STORE  = 7'b0100011;
  localparam logic [6:0] OP_BRANCH = 7'b1100011;
  localparam logic [6:0] OP_JAL    = 7'b1101111;
  localparam logic [6:0] OP_JALR   = 7'b1100111;

  // ALU operations
  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_SLL, ALU_SLT, ALU_SLTU,
    ALU_XOR, ALU_SRL, ALU_SRA, ALU_OR,  ALU_AND
  } alu_op_e;

  // How the ALU operation is chosen in a microinstruction
  typedef enum logic [1:0] {
    AM_ADD,     // plain add (addresses, PC+4, PC+imm)
    AM_FUNCT_R, // from funct3/funct7 of an R-type IR
    AM_FUNCT_I  // from funct3 (and funct7 for shifts) of an I-type IR
  } alu_mode_e;

  typedef enum logic {SRC1_A, SRC1_PC} alu_src1_e;
  typedef enum logic [1:0] {SRC2_B, SRC2_IMM, SRC2_FOUR} alu_src2_e;
  typedef enum logic {MADDR_PC, MADDR_ALUOUT} maddr_src_e;
  typedef enum logic {RFDAT_ALUOUT, RFDAT_MDR} rfdat_src_e;
  typedef enum logic {PCSRC_ALU, PCSRC_ALUOUT} pc_src_e;

  // Microsequencing field
  typedef enum logic [1:0] {
    SEQ_NEXT,          // uPC <- uPC + 1
    SEQ_DISPATCH,      // uPC <- dispatch(opcode)  ("case opcode")
    SEQ_START,         // uPC <- start (instruction fetch)
    SEQ_START_IF_NCOND // uPC <- start if branch condition false, else uPC + 1
  } useq_e;

  // Horizontal microinstruction: every datapath control in its own field
  typedef struct packed {
    logic       pc_we;
    pc_src_e    pc_src;
    logic       ir_we;
    maddr_src_e maddr_src;
    logic       mem_we;
    logic       mdr_we;
    logic       a_we;
    logic       b_we;
    logic       aluout_we;
    logic       rf_we;
    rfdat_src_e rfdat_src;
    alu_src1_e  alu_src1;
    alu_src2_e  alu_src2;
    alu_mode_e  alu_mode;
  } uctrl_t;

  typedef struct packed {
    uctrl_t ctrl;
    useq_e  seq;
  } uinst_t;

  // Vertical microinstruction: one bit per useful register transfer ("1-bit
  // signal means do this RT"); uop_decoder expands it into a uctrl_t.
  typedef struct packed {
    logic pc_plus4;         // PC <- PC + 4
    logic pc_aluout;        // PC <- ALUOut
    logic pc_a_imm;         // PC <- A + imm(IR)
    logic ir_fetch;         // IR <- MEM[PC]
    logic a_rs1;            // A <- RF[rs1(IR)]
    logic b_rs2;            // B <- RF[rs2(IR)]
    logic aluout_pc_imm;    // ALUOut <- PC + imm(IR)
    logic aluout_a_op_b;    // ALUOut <- A op B
    logic aluout_a_op_imm;  // ALUOut <- A op imm(IR)
    logic aluout_a_imm;     // ALUOut <- A + imm(IR)
    logic aluout_pc_4;      // ALUOut <- PC + 4
    logic mdr_load;         // MDR <- MEM[ALUOut]
    logic mem_store;        // MEM[ALUOut] <- B
    logic rf_aluout;        // RF[rd(IR)] <- ALUOut
    logic rf_mdr;           // RF[rd(IR)] <- MDR
    logic cond_ab;          // evaluate cond?(A, B)
  } uop_t;

  typedef struct packed {
    uop_t  uop;
    useq_e seq;
  } vinst_t;

  // Microprogram layout: the uPC value of each microinstruction. Each
  // instruction's steps sit at consecutive addresses, so the sequencer needs
  // only next, dispatch and start (no general jump).
  localparam int UPC_W = 5;
  typedef enum logic [UPC_W-1:0] {
    U_FETCH  = 5'd0,  U_DECODE = 5'd1,
    U_R_EX   = 5'd2,  U_R_WB   = 5'd3,
    U_I_EX   = 5'd4,  U_I_WB   = 5'd5,
    U_LW_EA  = 5'd6,  U_LW_MEM = 5'd7,  U_LW_WB = 5'd8,
    U_SW_EA  = 5'd9,  U_SW_MEM = 5'd10,
    U_BR_1   = 5'd11, U_BR_2   = 5'd12, U_BR_3  = 5'd13,
    U_JAL_1  = 5'd14, U_JAL_2  = 5'd15,
    U_JALR_1 = 5'd16, U_JALR_2 = 5'd17,
    U_NOP    = 5'd18
  } uaddr_e;

  // Instruction classes of the Ver 1.0 tick-counting sequencer
  typedef enum logic [2:0] {
    CL_RI, CL_LW, CL_SW, CL_BXX, CL_JALR, CL_JAL, CL_OTHER
  } iclass_e;

  // Main control of the single-cycle datapath (one decode of the opcode)
  typedef struct packed {
    logic      reg_write;
    logic      mem_write;
    logic      alu_src_imm;  // ALUSrc: second ALU operand is imm(IR)
    logic      mem_to_reg;   // MemtoReg: write back the loaded word
    logic      link;         // write back PC+4 (JAL, JALR)
    logic      branch;       // Branch: PC <- PC+imm when cond?(rs1,rs2)
    logic      jump;         // Jump (JAL): PC <- PC+imm
    logic      jalr;         // JALR: PC <- (rs1+imm) & ~1
    alu_mode_e alu_mode;
  } sc_ctrl_t;

  function automatic iclass_e classify(input logic [6:0] opcode);
    case (opcode)
      OP_R, OP_I: return CL_RI;
      OP_LOAD:    return CL_LW;
      OP_STORE:   return CL_SW;
      OP_BRANCH:  return CL_BXX;
      OP_JALR:    return CL_JALR;
      OP_JAL:     return CL_JAL;
      default:    return CL_OTHER;
    endcase
  endfunction

  // ALU operation from the instruction fields
  function automatic alu_op_e funct_to_op(input logic [2:0] f3, input logic f7b5,
                                          input logic is_r);
    case (f3)
      3'b000:  return (is_r && f7b5) ? ALU_SUB : ALU_ADD;
      3'b001:  return ALU_SLL;
      3'b010:  return ALU_SLT;
      3'b011:  return ALU_SLTU;
      3'b100:  return ALU_XOR;
      3'b101:  return f7b5 ? ALU_SRA : ALU_SRL;
      3'b110:  return ALU_OR;
      default: return ALU_AND;
    endcase
  endfunction

endpackage
