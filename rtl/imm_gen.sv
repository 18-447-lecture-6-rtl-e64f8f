// imm_gen: immediate(IR), the sign-extended immediate of an instruction.
//
// The format is chosen from the opcode: I-type for OP-IMM, LOAD and JALR,
// S-type for STORE, SB-type for branches and UJ-type for JAL (the lecture's
// immediate_{I-type,S-type} and immediate_{SB-type,U-type}). Other opcodes
// give the I-type field. Purely combinational; the bit layouts are those of
// RV32I. In every format imm[31:20] is a copy of the sign bit ir[31], so those
// twelve output bits are plain wires from the input.
module imm_gen
  import rv_pkg::*;
(
  input  logic [31:0] ir,
  output logic [31:0] imm
);
  always_comb begin
    case (ir[6:0])
      OP_STORE:  imm = {{20{ir[31]}}, ir[31:25], ir[11:7]};
      OP_BRANCH: imm = {{19{ir[31]}}, ir[31], ir[7], ir[30:25], ir[11:8], 1'b0};
      OP_JAL:    imm = {{11{ir[31]}}, ir[31], ir[19:12], ir[20], ir[30:21], 1'b0};
      default:   imm = {{20{ir[31]}}, ir[31:20]};
    endcase
  end
endmodule
