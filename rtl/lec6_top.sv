// lec6_top: the two multi-cycle RV32 implementations side by side.
//
//  * ucode_cpu: the microprogrammed core. A uPC-indexed control store of
//    horizontal microinstructions sequences a datapath that reuses one
//    memory port and one ALU, holding intermediate values in IR, MDR, A, B
//    and ALUOut (4-5 cycles per instruction).
//  * mc1_cpu: the "Ver 1.0" core. The unchanged single-cycle datapath runs
//    off a fast tick and commits only when the tick-counting sequencer
//    raises MasterEn (6-12 ticks per instruction).
//
// The two cores share clk and rst_n (active low, asynchronous) and nothing
// else; each has its own program-load, status and debug ports, prefixed
// u_ (microprogrammed) and v_ (Ver 1.0). MEM_WORDS sets every memory's size
// (32-bit words); U_VERTICAL_UCODE picks the vertical control-store format
// for the microprogrammed core.
module lec6_top
  import rv_pkg::*;
#(
  parameter int unsigned MEM_WORDS        = 1024,
  parameter bit          U_VERTICAL_UCODE = 1'b0
) (
  input  logic             clk,
  input  logic             rst_n,
  // microprogrammed core
  input  logic             u_load_we,
  input  logic [31:0]      u_load_addr,
  input  logic [31:0]      u_load_data,
  output logic             u_retire,
  output logic [31:0]      u_pc,
  output logic [31:0]      u_ir,
  output logic [UPC_W-1:0] u_upc,
  input  logic [4:0]       u_dbg_reg,
  output logic [31:0]      u_dbg_reg_data,
  input  logic [31:0]      u_dbg_addr,
  output logic [31:0]      u_dbg_mem_data,
  // Ver 1.0 core
  input  logic             v_load_we,
  input  logic             v_load_imem,
  input  logic [31:0]      v_load_addr,
  input  logic [31:0]      v_load_data,
  output logic             v_retire,
  output logic [31:0]      v_pc,
  output logic [31:0]      v_instr,
  output logic [3:0]       v_tick_state,
  input  logic [4:0]       v_dbg_reg,
  output logic [31:0]      v_dbg_reg_data,
  input  logic [31:0]      v_dbg_addr,
  output logic [31:0]      v_dbg_mem_data
);
  ucode_cpu #(.MEM_WORDS(MEM_WORDS), .VERTICAL_UCODE(U_VERTICAL_UCODE)) u_ucode (
    .clk, .rst_n,
    .load_we(u_load_we), .load_addr(u_load_addr), .load_data(u_load_data),
    .retire(u_retire), .pc(u_pc), .ir(u_ir), .upc(u_upc),
    .dbg_reg(u_dbg_reg), .dbg_reg_data(u_dbg_reg_data),
    .dbg_addr(u_dbg_addr), .dbg_mem_data(u_dbg_mem_data)
  );

  mc1_cpu #(.IMEM_WORDS(MEM_WORDS), .DMEM_WORDS(MEM_WORDS)) u_ver1 (
    .clk, .rst_n,
    .load_we(v_load_we), .load_imem(v_load_imem),
    .load_addr(v_load_addr), .load_data(v_load_data),
    .retire(v_retire), .pc(v_pc), .instr(v_instr), .tick_state(v_tick_state),
    .dbg_reg(v_dbg_reg), .dbg_reg_data(v_dbg_reg_data),
    .dbg_addr(v_dbg_addr), .dbg_mem_data(v_dbg_mem_data)
  );
endmodule
