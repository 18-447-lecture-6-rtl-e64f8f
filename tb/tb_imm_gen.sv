// tb_imm_gen: random instruction words of each format; the expected
// immediate is rebuilt from the RV32I bit layout as a signed integer sum.
module tb_imm_gen;
  import rv_pkg::*;
  `include "tb_check.svh"
  logic [31:0] ir, imm;
  imm_gen dut (.*);
  initial begin
    #100000 failures++; $display("watchdog"); finish_tb();
  end
  initial begin
    logic [6:0] opcs [7];
    int e;
    opcs = '{OP_I, OP_LOAD, OP_JALR, OP_STORE, OP_BRANCH, OP_JAL, OP_R};
    for (int k = 0; k < 2000; k++) begin
      ir = {$urandom} & ~32'h7f | 32'(opcs[k % 7]);
      #1;
      case (opcs[k % 7])
        OP_STORE:  e = int'(ir[11:7]) + 32 * int'(ir[30:25]) - (ir[31] ? 2048 : 0);
        OP_BRANCH: e = 2 * int'(ir[11:8]) + 32 * int'(ir[30:25]) + 2048 * int'(ir[7])
                       - (ir[31] ? 4096 : 0);
        OP_JAL:    e = 2 * int'(ir[30:21]) + 2048 * int'(ir[20]) + 4096 * int'(ir[19:12])
                       - (ir[31] ? 1048576 : 0);
        default:   e = int'(ir[30:20]) - (ir[31] ? 2048 : 0);
      endcase
      check(imm == 32'(e), $sformatf("ir %h imm %h exp %h", ir, imm, 32'(e)));
    end
    finish_tb();
  end
endmodule
