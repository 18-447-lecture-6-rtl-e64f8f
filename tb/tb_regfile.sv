// tb_regfile: random writes and reads against a model array; checks that
// x0 stays zero, that reset clears the registers, and that a write is
// visible on the read ports only after the clock edge.
module tb_regfile;
  `include "tb_check.svh"
  logic clk = 0, rst_n = 0, we = 0;
  logic [4:0] rs1 = 0, rs2 = 0, rd = 0, dbg_addr = 0;
  logic [31:0] rd1, rd2, wd = 0, dbg_data;
  logic [31:0] m [32];
  regfile dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("watchdog"); finish_tb();
  end
  initial begin
    foreach (m[i]) m[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 32; i++) begin
      dbg_addr = 5'(i); #1 check(dbg_data == 0, "reset value");
    end
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      we = $urandom_range(0, 1); rd = 5'($urandom); wd = $urandom;
      rs1 = 5'($urandom); rs2 = rd; dbg_addr = 5'($urandom);
      #1;
      check(rd1 == m[rs1], $sformatf("rd1 x%0d", rs1));
      check(rd2 == m[rs2], "rd2 before write");
      check(dbg_data == m[dbg_addr], "dbg port");
      @(posedge clk);
      if (we && rd != 0) m[rd] = wd;
      #1 check(rd2 == m[rs2], $sformatf("rd2 after write x%0d", rs2));
    end
    check(m[0] == 0 && rd1 !== 'x, "x0");
    finish_tb();
  end
endmodule
