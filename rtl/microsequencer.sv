// microsequencer: the uPC and its next-address logic.
//
// The uPC register indexes the microcode storage. Each cycle the address
// select logic loads it with one of: uPC+1 from the incrementer (SEQ_NEXT),
// the dispatch target of the IR opcode (SEQ_DISPATCH, the "case opcode" of
// the decode step), the fetch address (SEQ_START), or, for SEQ_START_IF_NCOND,
// the fetch address when the branch condition is false and uPC+1 when it is
// true. The structure (counter, +1 adder, address select fed by the opcode
// and the sequencing control) follows the lecture; the dispatch table is
// this design's microprogram layout (rv_pkg::uaddr_e). Asynchronous active-low
// reset puts the uPC at the fetch step. `retire` is 1 in the last
// microinstruction of an instruction (the next uPC is the fetch step).
module microsequencer
  import rv_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  useq_e            seq,
  input  logic [6:0]       opcode,
  input  logic             cond,
  output logic [UPC_W-1:0] upc,
  output logic             retire
);
  logic [UPC_W-1:0] upc_inc, upc_next, dispatch;

  assign upc_inc = upc + 1'b1;

  // dispatch ROM: opcode -> first opcode-dependent microinstruction
  always_comb begin
    case (opcode)
      OP_R:      dispatch = U_R_EX;
      OP_I:      dispatch = U_I_EX;
      OP_LOAD:   dispatch = U_LW_EA;
      OP_STORE:  dispatch = U_SW_EA;
      OP_BRANCH: dispatch = U_BR_1;
      OP_JAL:    dispatch = U_JAL_1;
      OP_JALR:   dispatch = U_JALR_1;
      default:   dispatch = U_NOP;
    endcase
  end

  // address select logic
  always_comb begin
    case (seq)
      SEQ_NEXT:           upc_next = upc_inc;
      SEQ_DISPATCH:       upc_next = dispatch;
      SEQ_START:          upc_next = U_FETCH;
      SEQ_START_IF_NCOND: upc_next = cond ? upc_inc : U_FETCH;
      default:            upc_next = U_FETCH;
    endcase
  end

  assign retire = (upc_next == U_FETCH);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) upc <= U_FETCH;
    else        upc <= upc_next;
  end
endmodule
