// tb_mc1_cpu: lock-step test of the Ver 1.0 (MasterEn) multi-cycle core.
//
// Loads a generated program (random ALU work, loads and stores, a counted
// loop, every branch condition, JAL, JALR, an unknown opcode, halt loop)
// and runs it next to the reference model. At every retired instruction it
// checks the instruction, the new PC, the destination register and the
// number of ticks the instruction took (8 R/I-type, 12 LW, 11 SW, 7 Bxx and
// JALR, 6 JAL); at the end it compares every register and the data words.
// The program goes into the instruction memory, data into the data memory.
module tb_mc1_cpu;
  import rv_pkg::*;
  import rv_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  logic load_we = 0;
  logic [31:0] load_addr = 0, load_data = 0;
  logic retire;
  logic [31:0] pc, instr;
  logic [3:0] tick_state;
  logic load_imem = 1;
  logic [4:0] dbg_reg = 0;
  logic [31:0] dbg_reg_data, dbg_addr = 0, dbg_mem_data;

  mc1_cpu dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] prog [$];
  rv_iss iss;
  int cyc, nret, halt_pc;
  bit pend;
  int rd_chk;

  initial begin
    void'($urandom(11));
    gen_program(prog, 60);
    halt_pc = (prog.size() - 1) * 4;
    iss = new();
    foreach (prog[i]) iss.mem[i] = prog[i];
    // load during reset
    foreach (prog[i]) begin
      @(negedge clk);
      load_we = 1; load_addr = 4 * i; load_data = prog[i];
    end
    @(negedge clk) load_we = 0;
    @(posedge clk); #1 rst_n = 1;
    cyc = 0; nret = 0; pend = 0;
    while (1) begin
      @(negedge clk);
      cyc++;
      if (pend) begin
        check(pc == iss.pc, $sformatf("pc %h exp %h", pc, iss.pc));
        dbg_reg = 5'(rd_chk); #1;
        check(dbg_reg_data == iss.x[rd_chk],
              $sformatf("x%0d=%h exp %h", rd_chk, dbg_reg_data, iss.x[rd_chk]));
        pend = 0;
        if (iss.pc == halt_pc && nret > 5) break;
      end
      if (retire) begin
        logic [31:0] ins;
        ins = iss.step();
        check(instr == ins, $sformatf("instr %h exp %h", instr, ins));
        check(cyc == ver1_cycles(kind_of(ins)),
              $sformatf("instr %h took %0d cycles", ins, cyc));
        rd_chk = iss.last_rd;
        cyc = 0; nret++; pend = 1;
      end
    end
    for (int r = 0; r < 32; r++) begin
      dbg_reg = 5'(r); #1;
      check(dbg_reg_data == iss.x[r], $sformatf("final x%0d", r));
    end
    for (int w = 0; w < 20; w++) begin
      dbg_addr = DATA_BASE + 4 * w; #1;
      if (iss.mem.exists(dbg_addr >> 2)) check(dbg_mem_data == iss.rd_mem(dbg_addr), $sformatf("mem %h", dbg_addr));
    end
    $display("retired %0d instructions", nret);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
