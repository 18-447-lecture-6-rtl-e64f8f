// tb_alu: random operands through every ALU operation and every branch
// condition, compared with expected values computed here.
module tb_alu;
  import rv_pkg::*;
  `include "tb_check.svh"
  logic [31:0] a, b, y;
  alu_op_e op;
  logic [2:0] br_f3;
  logic cond;
  alu dut (.*);

  function automatic logic [31:0] ref_y(alu_op_e o, logic [31:0] x, logic [31:0] z);
    longint sx = longint'($signed(x)), sz = longint'($signed(z));
    case (o)
      ALU_ADD:  return 32'(64'(x) + 64'(z));
      ALU_SUB:  return 32'(64'(x) - 64'(z));
      ALU_SLL:  return 32'(64'(x) * (64'd1 << z[4:0]));
      ALU_SLT:  return (sx < sz) ? 1 : 0;
      ALU_SLTU: return (64'(x) < 64'(z)) ? 1 : 0;
      ALU_XOR:  return (x | z) & ~(x & z);
      ALU_SRL:  return 32'(64'(x) / (64'd1 << z[4:0]));
      ALU_SRA:  return 32'(sx >>> z[4:0]);
      ALU_OR:   return ~(~x & ~z);
      default:  return ~(~x | ~z);
    endcase
  endfunction

  function automatic bit ref_c(logic [2:0] f, logic [31:0] x, logic [31:0] z);
    longint sx = longint'($signed(x)), sz = longint'($signed(z));
    case (f)
      3'b000: return x == z;
      3'b001: return x != z;
      3'b100: return sx < sz;
      3'b101: return !(sx < sz);
      3'b110: return 64'(x) < 64'(z);
      3'b111: return !(64'(x) < 64'(z));
      default: return 0;
    endcase
  endfunction

  initial begin
    #100000 failures++; $display("watchdog"); finish_tb();
  end
  initial begin
    logic [2:0] fs [6];
    fs = '{3'b000, 3'b001, 3'b100, 3'b101, 3'b110, 3'b111};
    for (int k = 0; k < 3000; k++) begin
      a = $urandom; b = $urandom;
      if (k % 7 == 0) b = a;
      if (k % 11 == 0) a = 32'h8000_0000;
      op = alu_op_e'(k % 10);
      br_f3 = fs[k % 6];
      #1;
      check(y == ref_y(op, a, b), $sformatf("%s %h %h -> %h", op.name(), a, b, y));
      check(cond == ref_c(br_f3, a, b), $sformatf("cond f3=%0d %h %h", br_f3, a, b));
    end
    finish_tb();
  end
endmodule
