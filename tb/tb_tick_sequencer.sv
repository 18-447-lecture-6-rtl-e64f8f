// tb_tick_sequencer: for instruction classes in random order, counts the
// ticks from IF1 to the MasterEn tick and checks them against the lecture's
// CPI row (R/I 8, LW 12, SW 11, Bxx 7, JALR 7, JAL 6); checks that MasterEn
// is raised only on that last tick, that JAL skips ID, that only loads and
// stores visit MEM1..MEM4, and that the state then returns to IF1.
module tb_tick_sequencer;
  import rv_pkg::*;
  `include "tb_check.svh"
  logic clk = 0, rst_n = 0, master_en;
  iclass_e iclass = CL_RI;
  logic [3:0] state;
  tick_sequencer dut (.*);
  always #5 clk = ~clk;

  function automatic int cpi(iclass_e c);
    case (c)
      CL_LW: return 12; CL_SW: return 11; CL_BXX: return 7;
      CL_JALR: return 7; CL_JAL: return 6; default: return 8;
    endcase
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog"); finish_tb();
  end
  initial begin
    int n;
    bit saw_id, saw_mem;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 300; k++) begin
      iclass = iclass_e'($urandom_range(0, 6));
      n = 0; saw_id = 0; saw_mem = 0;
      check(state == 4'd0, "starts in IF1");
      forever begin
        #1;
        n++;
        if (state == 4'd4) saw_id = 1;
        if (state >= 4'd7 && state <= 4'd10) saw_mem = 1;
        if (master_en || n >= 40) break;
        @(negedge clk);
      end
      check(n == cpi(iclass), $sformatf("k=%0d %s took %0d ticks", k, iclass.name(), n));
      check(saw_id == (iclass != CL_JAL), "ID visited unless JAL");
      check(saw_mem == (iclass inside {CL_LW, CL_SW}), "MEM states only for LW/SW");
      @(negedge clk);
    end
    finish_tb();
  end
endmodule
