// ucode_cpu: the microprogrammed multi-cycle RV32 core.
//
// A microsequencer steps through a control store of horizontal
// microinstructions; each microinstruction's control field drives the
// shared-resource datapath for one clock cycle and its sequencing field picks
// the next uPC. An instruction therefore takes as many cycles as its
// register transfers need: 4 for R-type, I-type, SW and JAL/JALR, 5 for LW,
// 4 for a branch not taken and 5 for one taken. The organisation (uPC,
// incrementer, address select logic, microcode storage driving the datapath)
// follows the lecture; cycle counts follow from this design's microprogram.
//
// VERTICAL_UCODE selects the control-store format: 0 (default) stores the
// horizontal control word directly; 1 stores a vertical uop, one bit per
// register transfer, expanded by uop_decoder. Both run the same microprogram
// with the same timing.
//
// Interface: clk, active-low asynchronous reset rst_n; load_* fill memory
// during reset; `retire` is 1 in the last cycle of each instruction; pc, ir
// and upc expose the state; dbg_* read registers and memory.
module ucode_cpu
  import rv_pkg::*;
#(
  parameter int unsigned MEM_WORDS      = 1024,
  parameter bit          VERTICAL_UCODE = 1'b0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load_we,
  input  logic [31:0]      load_addr,
  input  logic [31:0]      load_data,
  output logic             retire,
  output logic [31:0]      pc,
  output logic [31:0]      ir,
  output logic [UPC_W-1:0] upc,
  input  logic [4:0]       dbg_reg,
  output logic [31:0]      dbg_reg_data,
  input  logic [31:0]      dbg_addr,
  output logic [31:0]      dbg_mem_data
);
  uinst_t     uinst;
  logic [6:0] opcode;
  logic       cond;

  microsequencer u_seq (
    .clk, .rst_n, .seq(uinst.seq), .opcode, .cond, .upc, .retire
  );

  if (VERTICAL_UCODE) begin : g_vertical
    vinst_t vinst;
    ucode_rom_vertical u_rom (.upc, .vinst);
    uop_decoder u_dec (.uop(vinst.uop), .ctrl(uinst.ctrl));
    assign uinst.seq = vinst.seq;
  end else begin : g_horizontal
    ucode_rom u_rom (.upc, .uinst);
  end

  mc_datapath #(.MEM_WORDS(MEM_WORDS)) u_dp (
    .clk, .rst_n, .ctrl(uinst.ctrl), .opcode, .cond, .pc, .ir,
    .load_we, .load_addr, .load_data,
    .dbg_reg, .dbg_reg_data, .dbg_addr, .dbg_mem_data
  );
endmodule
