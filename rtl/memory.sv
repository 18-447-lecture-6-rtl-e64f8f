// memory: a word-organised memory with one access port.
//
// Reads are combinational (rdata = mem[addr]); a write of wdata happens on
// the rising clock edge when `we` is 1. Addresses are byte addresses and
// only whole aligned words are accessed (LW/SW), so bits [1:0] are ignored
// and the index wraps at WORDS. A load port (load_we/load_addr/load_data),
// which has priority over `we`, fills the memory with a program before the
// core runs, and a debug read port lets a test bench inspect it. Contents
// are not reset. The lecture names the memory (its 200 ps access, one
// "instruction or data" memory in the shared datapath, split instruction and
// data memories in the single-cycle one) but gives no size: WORDS is chosen.
module memory #(
  parameter int unsigned WORDS = 1024
) (
  input  logic        clk,
  input  logic [31:0] addr,
  output logic [31:0] rdata,
  input  logic        we,
  input  logic [31:0] wdata,
  input  logic        load_we,
  input  logic [31:0] load_addr,
  input  logic [31:0] load_data,
  input  logic [31:0] dbg_addr,
  output logic [31:0] dbg_data
);
  localparam int unsigned AW = $clog2(WORDS);
  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (load_we)  mem[load_addr[AW+1:2]] <= load_data;
    else if (we)  mem[addr[AW+1:2]]      <= wdata;
  end

  assign rdata    = mem[addr[AW+1:2]];
  assign dbg_data = mem[dbg_addr[AW+1:2]];
endmodule
