// mc1_cpu: the Ver 1.0 multi-cycle RV32 core.
//
// The single-cycle datapath (mc1_datapath) and its combinational main
// control (sc_control) are left as they are; a tick-counting sequencer
// (tick_sequencer) raises MasterEn once the instruction's combinational
// delay has elapsed, so each instruction class takes only as many fast
// clock ticks as it needs: 8 for R/I-type, 12 for LW, 11 for SW, 7 for Bxx
// and JALR, 6 for JAL. This follows the lecture's "Ver 1.0" design.
//
// Interface: clk, active-low asynchronous reset rst_n; load_* fill the
// instruction (load_imem=1) or data memory during reset; `retire` (MasterEn)
// is 1 on the tick at whose edge an instruction commits; pc, instr and
// tick_state expose the state; dbg_* read registers and data memory.
module mc1_cpu
  import rv_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 1024,
  parameter int unsigned DMEM_WORDS = 1024
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        load_we,
  input  logic        load_imem,
  input  logic [31:0] load_addr,
  input  logic [31:0] load_data,
  output logic        retire,
  output logic [31:0] pc,
  output logic [31:0] instr,
  output logic [3:0]  tick_state,
  input  logic [4:0]  dbg_reg,
  output logic [31:0] dbg_reg_data,
  input  logic [31:0] dbg_addr,
  output logic [31:0] dbg_mem_data
);
  sc_ctrl_t ctrl;
  iclass_e  iclass;
  logic     master_en;

  sc_control u_ctl (.opcode(instr[6:0]), .ctrl, .iclass);

  tick_sequencer u_seq (.clk, .rst_n, .iclass, .master_en, .state(tick_state));

  mc1_datapath #(.IMEM_WORDS(IMEM_WORDS), .DMEM_WORDS(DMEM_WORDS)) u_dp (
    .clk, .rst_n, .master_en, .ctrl, .instr, .pc,
    .load_we, .load_imem, .load_addr, .load_data,
    .dbg_reg, .dbg_reg_data, .dbg_addr, .dbg_mem_data
  );

  assign retire = master_en;
endmodule
