// tb_lec6_top: end-to-end test of both cores at their default sizes.
//
// Phase 1 runs the generated program (every instruction kind) on both
// cores at once, each in lock-step with its own reference model: at every
// retired instruction the instruction, new PC, destination register and
// cycle count are checked. Phase 2 runs the lecture's instruction mix (60
// instructions: 25% LW, 15% SW, 40% ALU, 13.3% branches, 6.7% jumps) and
// checks the total cycles: 551 ticks on the Ver 1.0 core (CPI 9.18, the
// lecture's weighted mean) and 255 cycles on the microprogrammed core.
// Mechanisms counted (each must occur): uPC next, dispatch, start,
// start-if-not-cond with the condition true and false, every microprogram
// entry in use, the unknown-opcode path, MasterEn commits, JAL skipping ID,
// and loads and stores passing through MEM1..MEM4.
module tb_lec6_top;
  import rv_pkg::*;
  import rv_tb_pkg::*;
  `include "tb_check.svh"

  logic clk = 0, rst_n = 0;
  logic u_load_we = 0, v_load_we = 0, v_load_imem = 1;
  logic [31:0] u_load_addr = 0, u_load_data = 0, v_load_addr = 0, v_load_data = 0;
  logic u_retire, v_retire;
  logic [31:0] u_pc, u_ir, v_pc, v_instr;
  logic [UPC_W-1:0] u_upc;
  logic [3:0] v_tick_state;
  logic [4:0] u_dbg_reg = 0, v_dbg_reg = 0;
  logic [31:0] u_dbg_reg_data, v_dbg_reg_data, u_dbg_addr = 0, v_dbg_addr = 0;
  logic [31:0] u_dbg_mem_data, v_dbg_mem_data;

  lec6_top dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("watchdog"); finish_tb();
  end

  // mechanism counters, from the uPC and tick-state traces
  int n_next, n_dispatch, n_start, n_cond_true, n_cond_false, n_nop, n_masteren,
      n_jal_skip_id, n_mem_ticks;
  int upc_seen [32];
  logic [UPC_W-1:0] prev_upc;
  logic [3:0] prev_ts;
  always @(posedge clk) if (rst_n) begin
    prev_upc <= u_upc;
    prev_ts  <= v_tick_state;
  end
  always @(negedge clk) if (rst_n) begin
    upc_seen[u_upc]++;
    if (prev_upc == 5'd1) n_dispatch++;
    else if (prev_upc == 5'd12 && u_upc == 5'd13) n_cond_true++;
    else if (prev_upc == 5'd12 && u_upc == 5'd0) n_cond_false++;
    else if (u_upc == 5'd0) n_start++;
    else if (u_upc == prev_upc + 1) n_next++;
    if (u_upc == 5'd18) n_nop++;
    if (v_retire) n_masteren++;
    if (prev_ts == 4'd3 && v_tick_state == 4'd5) n_jal_skip_id++;
    if (v_tick_state inside {[4'd7:4'd10]}) n_mem_ticks++;
  end

  logic [31:0] prog [$];
  int u_mix_cycles, v_mix_cycles;

  function automatic logic [31:0] data_word(input int w);
    return 32'h1357_9bdf * (w + 1);
  endfunction

  task automatic load_both();
    rst_n = 0;
    foreach (prog[i]) begin
      @(negedge clk);
      u_load_we = 1; u_load_addr = 4 * i; u_load_data = prog[i];
      v_load_we = 1; v_load_addr = 4 * i; v_load_data = prog[i];
    end
    // initial data words (data memory of the Ver 1.0 core)
    for (int w = 0; w < 16; w++) begin
      @(negedge clk);
      u_load_we = 1; u_load_addr = DATA_BASE + 4 * w; u_load_data = data_word(w);
      v_load_we = 1; v_load_imem = 0; v_load_addr = DATA_BASE + 4 * w; v_load_data = data_word(w);
    end
    @(negedge clk) begin u_load_we = 0; v_load_we = 0; v_load_imem = 1; end
    @(posedge clk); #1 rst_n = 1;
  endtask

  // lock-step run of one core; ver1 selects the Ver 1.0 core
  task automatic run(input bit ver1, output int mix_cycles);
    rv_iss iss = new();
    int cyc = 0, nret = 0, rd_chk = 0, halt_pc = (prog.size() - 1) * 4, exp;
    bit pend = 0;
    logic [31:0] ins, cur_pc;
    foreach (prog[i]) iss.mem[i] = prog[i];
    for (int w = 0; w < 16; w++) iss.mem[(DATA_BASE >> 2) + w] = data_word(w);
    mix_cycles = 0;
    while (1) begin
      @(negedge clk);
      cyc++;
      if (pend) begin
        check((ver1 ? v_pc : u_pc) == iss.pc, $sformatf("core %0d pc", ver1));
        if (ver1) v_dbg_reg = 5'(rd_chk); else u_dbg_reg = 5'(rd_chk);
        #1 check((ver1 ? v_dbg_reg_data : u_dbg_reg_data) == iss.x[rd_chk],
                 $sformatf("core %0d x%0d got %h exp %h ins %h", ver1, rd_chk, ver1 ? v_dbg_reg_data : u_dbg_reg_data, iss.x[rd_chk], ins));
        pend = 0;
        if (iss.pc == halt_pc && nret > 5) break;
      end
      if (ver1 ? v_retire : u_retire) begin
        cur_pc = iss.pc;
        ins = iss.step();
        check((ver1 ? v_instr : u_ir) == ins, $sformatf("core %0d instr %h", ver1, ins));
        exp = ver1 ? ver1_cycles(kind_of(ins)) : ucode_cycles(kind_of(ins), iss.taken);
        check(cyc == exp, $sformatf("core %0d instr %h took %0d", ver1, ins, cyc));
        if (cur_pc >= 4 && cur_pc <= 240) mix_cycles += cyc;
        rd_chk = iss.last_rd;
        cyc = 0; nret++; pend = 1;
      end
    end
    for (int r = 0; r < 32; r++) begin
      if (ver1) v_dbg_reg = 5'(r); else u_dbg_reg = 5'(r);
      #1 check((ver1 ? v_dbg_reg_data : u_dbg_reg_data) == iss.x[r],
               $sformatf("core %0d final x%0d", ver1, r));
    end
    for (int w = 0; w < 16; w++) begin
      if (ver1) v_dbg_addr = DATA_BASE + 4 * w; else u_dbg_addr = DATA_BASE + 4 * w;
      #1 if (iss.mem.exists((DATA_BASE >> 2) + w))
        check((ver1 ? v_dbg_mem_data : u_dbg_mem_data) == iss.mem[(DATA_BASE >> 2) + w],
              $sformatf("core %0d mem word %0d got %h exp %h", ver1, w, ver1 ? v_dbg_mem_data : u_dbg_mem_data, iss.mem[(DATA_BASE >> 2) + w]));
    end
    $display("core %0d retired %0d instructions", ver1, nret);
  endtask

  initial begin
    int dummy;
    void'($urandom(3));
    gen_program(prog, 80);
    load_both();
    fork
      run(0, dummy);
      run(1, dummy);
    join
    gen_mix(prog);
    load_both();
    fork
      run(0, u_mix_cycles);
      run(1, v_mix_cycles);
    join
    $display("mix: Ver 1.0 %0d ticks for 60 instructions (CPI %0.3f), microprogrammed %0d cycles (CPI %0.3f)",
             v_mix_cycles, v_mix_cycles / 60.0, u_mix_cycles, u_mix_cycles / 60.0);
    check(v_mix_cycles == 551, "Ver 1.0 mix: 551 ticks, CPI 9.18");
    check(u_mix_cycles == 255, "microprogrammed mix: 255 cycles");
    $display("mechanisms: next=%0d dispatch=%0d start=%0d cond_true=%0d cond_false=%0d nop=%0d masteren=%0d jal_skip_id=%0d mem_ticks=%0d",
             n_next, n_dispatch, n_start, n_cond_true, n_cond_false, n_nop, n_masteren,
             n_jal_skip_id, n_mem_ticks);
    check(n_next > 0, "uPC next used");
    check(n_dispatch > 0, "dispatch used");
    check(n_start > 0, "start used");
    check(n_cond_true > 0, "branch condition true");
    check(n_cond_false > 0, "branch condition false");
    check(n_nop > 0, "unknown opcode path");
    check(n_masteren > 0, "MasterEn commits");
    check(n_jal_skip_id > 0, "JAL skips ID");
    check(n_mem_ticks > 0, "MEM1..MEM4 ticks");
    for (int a = 0; a <= 18; a++) check(upc_seen[a] > 0, $sformatf("uPC %0d used", a));
    finish_tb();
  end
endmodule
