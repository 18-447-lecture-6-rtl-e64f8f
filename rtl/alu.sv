// alu: the single 32-bit ALU of the datapath.
//
// Computes y = a op b for the RV32I integer operations (add, sub, shifts,
// set-less-than, logic) selected by `op`, and, independently, the branch
// condition cond?(a,b) of the branch whose funct3 is `br_f3` (BEQ, BNE, BLT,
// BGE, BLTU, BGEU). Purely combinational. The lecture gives the ALU only by
// function (its 100 ps delay and the register transfers that use it); the
// operation set is RV32I and the encoding of `op` is this design's own.
module alu
  import rv_pkg::*;
(
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  alu_op_e     op,
  input  logic [2:0]  br_f3,
  output logic [31:0] y,
  output logic        cond
);
  logic [4:0] shamt;
  assign shamt = b[4:0];

  always_comb begin
    unique case (op)
      ALU_ADD:  y = a + b;
      ALU_SUB:  y = a - b;
      ALU_SLL:  y = a << shamt;
      ALU_SLT:  y = {31'b0, $signed(a) < $signed(b)};
      ALU_SLTU: y = {31'b0, a < b};
      ALU_XOR:  y = a ^ b;
      ALU_SRL:  y = a >> shamt;
      ALU_SRA:  y = $unsigned($signed(a) >>> shamt);
      ALU_OR:   y = a | b;
      ALU_AND:  y = a & b;
      default:  y = a + b;
    endcase
  end

  always_comb begin
    case (br_f3)
      3'b000:  cond = (a == b);
      3'b001:  cond = (a != b);
      3'b100:  cond = ($signed(a) <  $signed(b));
      3'b101:  cond = ($signed(a) >= $signed(b));
      3'b110:  cond = (a <  b);
      3'b111:  cond = (a >= b);
      default: cond = 1'b0;
    endcase
  end
endmodule
