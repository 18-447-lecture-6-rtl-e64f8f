// rv_tb_pkg: test-bench helpers for the RV32 cores.
//
// Instruction encoders for the formats the cores execute, an independent
// instruction-set model (rv_iss) used as the reference in lock-step
// comparisons, the cycle counts each implementation should take per
// instruction, and generators for the test programs.
package rv_tb_pkg;

  localparam logic [6:0] R = 7'b0110011, I = 7'b0010011, LD = 7'b0000011,
                         ST = 7'b0100011, BR = 7'b1100011, JL = 7'b1101111,
                         JR = 7'b1100111;

  function automatic logic [31:0] enc_r(input logic [6:0] f7, input int rd,
                                        input int rs1, input int rs2, input logic [2:0] f3);
    return {f7, 5'(rs2), 5'(rs1), f3, 5'(rd), R};
  endfunction
  function automatic logic [31:0] enc_i(input logic [6:0] opc, input int rd,
                                        input int rs1, input int imm, input logic [2:0] f3);
    logic [31:0] v = 32'(imm);
    return {v[11:0], 5'(rs1), f3, 5'(rd), opc};
  endfunction
  function automatic logic [31:0] enc_s(input int rs2, input int rs1, input int imm);
    logic [31:0] v = 32'(imm);
    return {v[11:5], 5'(rs2), 5'(rs1), 3'b010, v[4:0], ST};
  endfunction
  function automatic logic [31:0] enc_b(input logic [2:0] f3, input int rs1,
                                        input int rs2, input int off);
    logic [31:0] v = 32'(off);
    return {v[12], v[10:5], 5'(rs2), 5'(rs1), f3, v[4:1], v[11], BR};
  endfunction
  function automatic logic [31:0] enc_j(input int rd, input int off);
    logic [31:0] v = 32'(off);
    return {v[20], v[10:1], v[11], v[19:12], 5'(rd), JL};
  endfunction
  function automatic logic [31:0] addi(input int rd, input int rs1, input int imm);
    return enc_i(I, rd, rs1, imm, 3'b000);
  endfunction
  function automatic logic [31:0] lw(input int rd, input int rs1, input int imm);
    return enc_i(LD, rd, rs1, imm, 3'b010);
  endfunction
  function automatic logic [31:0] jalr(input int rd, input int rs1, input int imm);
    return enc_i(JR, rd, rs1, imm, 3'b000);
  endfunction

  // a random R-type or I-type ALU instruction
  function automatic logic [31:0] rand_alu(input int rd, input int rs1, input int rs2);
    logic [2:0] f3 = 3'($urandom_range(0, 7));
    if ($urandom_range(0, 1) == 1) begin
      logic [6:0] f7 = ((f3 == 3'b000 || f3 == 3'b101) && $urandom_range(0, 1) == 1)
                       ? 7'b0100000 : 7'b0000000;
      return enc_r(f7, rd, rs1, rs2, f3);
    end else if (f3 == 3'b001 || f3 == 3'b101) begin
      logic [6:0] f7 = (f3 == 3'b101 && $urandom_range(0, 1) == 1) ? 7'b0100000 : 7'b0;
      return {f7, 5'($urandom_range(0, 31)), 5'(rs1), f3, 5'(rd), I};
    end else begin
      return enc_i(I, rd, rs1, $urandom_range(0, 4095) - 2048, f3);
    end
  endfunction

  typedef enum int {K_RI, K_LW, K_SW, K_BR, K_JAL, K_JALR, K_OTHER} kind_e;

  function automatic kind_e kind_of(input logic [31:0] ins);
    case (ins[6:0])
      R, I: return K_RI;
      LD:   return K_LW;
      ST:   return K_SW;
      BR:   return K_BR;
      JL:   return K_JAL;
      JR:   return K_JALR;
      default: return K_OTHER;
    endcase
  endfunction

  // clock cycles per instruction of the microprogrammed core
  function automatic int ucode_cycles(input kind_e k, input bit taken);
    case (k)
      K_LW:    return 5;
      K_BR:    return taken ? 5 : 4;
      K_OTHER: return 3;
      default: return 4;
    endcase
  endfunction

  // ticks per instruction of the Ver 1.0 core (the lecture's CPI row)
  function automatic int ver1_cycles(input kind_e k);
    case (k)
      K_LW:   return 12;
      K_SW:   return 11;
      K_BR:   return 7;
      K_JALR: return 7;
      K_JAL:  return 6;
      default: return 8;
    endcase
  endfunction

  // Reference model: architectural state and one-instruction step
  class rv_iss;
    logic [31:0] x [32];
    logic [31:0] pc;
    logic [31:0] mem [int unsigned];  // word index -> word
    bit          taken;
    int          last_rd;

    function new();
      foreach (x[i]) x[i] = '0;
      pc = '0;
    endfunction

    function logic [31:0] rd_mem(input logic [31:0] a);
      return mem.exists(a >> 2) ? mem[a >> 2] : 32'h0;
    endfunction

    function logic [31:0] step();
      logic [31:0] ins, a, b, r, immi, imms, immb, immj, npc;
      logic [2:0]  f3;
      logic [4:0]  sh;
      bit          wr;
      ins  = rd_mem(pc);
      a    = x[ins[19:15]];
      b    = x[ins[24:20]];
      f3   = ins[14:12];
      immi = {{20{ins[31]}}, ins[31:20]};
      imms = {{20{ins[31]}}, ins[31:25], ins[11:7]};
      immb = {{20{ins[31]}}, ins[7], ins[30:25], ins[11:8], 1'b0};
      immj = {{12{ins[31]}}, ins[19:12], ins[20], ins[30:21], 1'b0};
      npc  = pc + 4;
      wr   = 0;
      r    = '0;
      taken = 0;
      case (ins[6:0])
        R, I: begin
          logic [31:0] o2 = (ins[6:0] == R) ? b : immi;
          sh = o2[4:0];
          wr = 1;
          case (f3)
            3'b000: r = (ins[6:0] == R && ins[30]) ? a - o2 : a + o2;
            3'b001: r = a << sh;
            3'b010: r = ($signed(a) < $signed(o2)) ? 1 : 0;
            3'b011: r = (a < o2) ? 1 : 0;
            3'b100: r = a ^ o2;
            3'b101: r = ins[30] ? 32'($signed(a) >>> sh) : a >> sh;
            3'b110: r = a | o2;
            3'b111: r = a & o2;
          endcase
        end
        LD: begin r = rd_mem(a + immi); wr = 1; end
        ST: mem[(a + imms) >> 2] = b;
        BR: begin
          case (f3)
            3'b000: taken = (a == b);
            3'b001: taken = (a != b);
            3'b100: taken = ($signed(a) < $signed(b));
            3'b101: taken = ($signed(a) >= $signed(b));
            3'b110: taken = (a < b);
            3'b111: taken = (a >= b);
            default: taken = 0;
          endcase
          if (taken) npc = pc + immb;
        end
        JL: begin r = pc + 4; wr = 1; npc = pc + immj; end
        JR: begin r = pc + 4; wr = 1; npc = (a + immi) & ~32'd1; end
        default: ;
      endcase
      last_rd = wr ? int'(ins[11:7]) : 0;
      if (wr && ins[11:7] != 0) x[ins[11:7]] = r;
      pc = npc;
      return ins;
    endfunction
  endclass

  localparam int DATA_BASE = 32'h400;  // reachable with a positive 12-bit ADDI

  // A program that uses every instruction kind: random ALU work, stores and
  // loads, a counted loop (branch taken and not taken), every branch
  // condition, JAL and JALR, ending in a JAL-to-self halt loop.
  function automatic void gen_program(ref logic [31:0] prog [$], input int n_rand);
    int loop_pc, tgt;
    prog.delete();
    prog.push_back(addi(2, 0, DATA_BASE));          // x2 = data base
    for (int r = 3; r < 16; r++) prog.push_back(addi(r, 0, $urandom_range(0, 4095) - 2048));
    for (int k = 0; k < n_rand; k++)
      prog.push_back(rand_alu($urandom_range(3, 15), $urandom_range(0, 15),
                              $urandom_range(0, 15)));
    for (int k = 0; k < 6; k++) prog.push_back(enc_s(3 + k, 2, 4 * k));
    for (int k = 0; k < 6; k++) prog.push_back(lw(16 + k, 2, 4 * (5 - k)));
    prog.push_back(enc_s(0, 2, -4 + 64));           // store x0
    prog.push_back(addi(1, 0, 4));                  // loop counter
    loop_pc = prog.size() * 4;
    prog.push_back(addi(1, 1, -1));
    prog.push_back(enc_r(7'b0, 22, 22, 1, 3'b000));  // x22 += x1
    prog.push_back(enc_b(3'b001, 1, 0, loop_pc - prog.size() * 4));  // bne
    // each branch condition, taken or not depending on the random registers
    for (int i = 0; i < 6; i++) begin
      logic [2:0] cc [6];
      cc = '{3'b000, 3'b001, 3'b100, 3'b101, 3'b110, 3'b111};
      prog.push_back(enc_b(cc[i], $urandom_range(3, 15), $urandom_range(3, 15), 8));
      prog.push_back(addi(23, 23, 1 << i));
    end
    prog.push_back(enc_b(3'b000, 3, 3, 8));         // beq always taken
    prog.push_back(addi(24, 0, 99));                // skipped
    prog.push_back(enc_j(25, 8));                   // jal over one
    prog.push_back(addi(24, 0, 77));                // skipped
    tgt = (prog.size() + 3) * 4;
    prog.push_back(addi(26, 0, tgt + 1));           // odd address: bit 0 cleared
    prog.push_back(jalr(27, 26, 0));
    prog.push_back(addi(24, 0, 55));                // skipped
    prog.push_back(addi(28, 0, 1));                 // jalr target
    prog.push_back(32'h0000_0000);                  // not in the subset: no-op
    prog.push_back(enc_j(0, 0));                    // halt: jal x0, 0
  endfunction

  // The instruction mix of the lecture's CPI example (25% LW, 15% SW,
  // 40% ALU, 13.3% branch, 6.7% jump), 60 instructions in straight-line
  // code: branches are not taken and jumps (JAL) go to the next instruction.
  function automatic void gen_mix(ref logic [31:0] prog [$]);
    int nlw = 15, nsw = 9, nalu = 24, nbr = 8, nj = 4, tot;
    kind_e pick [$];
    prog.delete();
    for (int i = 0; i < nlw; i++) pick.push_back(K_LW);
    for (int i = 0; i < nsw; i++) pick.push_back(K_SW);
    for (int i = 0; i < nalu; i++) pick.push_back(K_RI);
    for (int i = 0; i < nbr; i++) pick.push_back(K_BR);
    for (int i = 0; i < nj; i++) pick.push_back(K_JAL);
    pick.shuffle();
    tot = pick.size();
    prog.push_back(addi(2, 0, DATA_BASE));          // setup (not counted)
    foreach (pick[i]) begin
      case (pick[i])
        K_LW:  prog.push_back(lw($urandom_range(3, 15), 2, 4 * $urandom_range(0, 15)));
        K_SW:  prog.push_back(enc_s($urandom_range(3, 15), 2, 4 * $urandom_range(0, 15)));
        K_RI:  prog.push_back(rand_alu($urandom_range(3, 15), $urandom_range(3, 15),
                                       $urandom_range(3, 15)));
        K_BR:  prog.push_back(enc_b(3'b001, 0, 0, -4 * (prog.size())));  // bne x0,x0: never
        default: prog.push_back(enc_j(0, 4));
      endcase
    end
    prog.push_back(enc_j(0, 0));                    // halt
    assert (tot == 60);
  endfunction

endpackage
