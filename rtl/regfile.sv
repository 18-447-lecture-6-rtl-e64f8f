// regfile: the 32 x 32-bit general-purpose register file (GPR).
//
// Two combinational read ports (rs1, rs2) and one write port written on the
// rising clock edge when `we` is 1; register x0 always reads zero and ignores
// writes. A third read port (`dbg_*`) lets a test bench observe the
// architectural state. Registers reset to zero. The lecture fixes the port
// count (RF[rs1(IR)], RF[rs2(IR)], RF[rd(IR)]) but not the reset behaviour.
module regfile #(
  parameter int unsigned NREGS = 32,
  parameter int unsigned XLEN  = 32
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [$clog2(NREGS)-1:0] rs1,
  input  logic [$clog2(NREGS)-1:0] rs2,
  output logic [XLEN-1:0]          rd1,
  output logic [XLEN-1:0]          rd2,
  input  logic                     we,
  input  logic [$clog2(NREGS)-1:0] rd,
  input  logic [XLEN-1:0]          wd,
  input  logic [$clog2(NREGS)-1:0] dbg_addr,
  output logic [XLEN-1:0]          dbg_data
);
  logic [XLEN-1:0] r [NREGS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) r[i] <= '0;
    end else if (we && rd != '0) begin
      r[rd] <= wd;
    end
  end

  assign rd1      = (rs1 == '0) ? '0 : r[rs1];
  assign rd2      = (rs2 == '0) ? '0 : r[rs2];
  assign dbg_data = (dbg_addr == '0) ? '0 : r[dbg_addr];
endmodule
