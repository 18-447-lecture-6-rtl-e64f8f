// tb_memory: random word writes through the access port and the load port
// (which wins when both write), compared with a model; reads are
// combinational on both read ports and ignore the byte-offset bits.
module tb_memory;
  `include "tb_check.svh"
  localparam int WORDS = 64;
  logic clk = 0, we = 0, load_we = 0;
  logic [31:0] addr = 0, rdata, wdata = 0, load_addr = 0, load_data = 0, dbg_addr = 0, dbg_data;
  logic [31:0] m [WORDS];
  memory #(.WORDS(WORDS)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("watchdog"); finish_tb();
  end
  initial begin
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk); load_we = 1; load_addr = 4 * i; load_data = i * 3 + 1;
      m[i] = i * 3 + 1;
    end
    @(negedge clk) load_we = 0;
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      addr = {$urandom_range(0, WORDS - 1), 2'($urandom)};
      dbg_addr = 4 * $urandom_range(0, WORDS - 1);
      we = $urandom_range(0, 1); wdata = $urandom;
      load_we = ($urandom_range(0, 7) == 0); load_addr = 4 * $urandom_range(0, WORDS - 1);
      load_data = $urandom;
      #1;
      check(rdata == m[addr[7:2]], "read port");
      check(dbg_data == m[dbg_addr[7:2]], "debug port");
      @(posedge clk);
      if (load_we) m[load_addr[7:2]] = load_data;
      else if (we) m[addr[7:2]] = wdata;
    end
    finish_tb();
  end
endmodule
