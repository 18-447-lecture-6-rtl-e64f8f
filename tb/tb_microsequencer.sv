// tb_microsequencer: random sequencing fields, opcodes and branch
// conditions; the uPC must follow next (+1), dispatch (per-opcode target),
// start (fetch) and start-if-not-cond, and `retire` must flag the cycles
// whose successor is the fetch step.
module tb_microsequencer;
  import rv_pkg::*;
  `include "tb_check.svh"
  logic clk = 0, rst_n = 0, cond = 0, retire;
  useq_e seq = SEQ_NEXT;
  logic [6:0] opcode = 0;
  logic [UPC_W-1:0] upc;
  microsequencer dut (.*);
  always #5 clk = ~clk;

  function automatic int target(logic [6:0] o);
    case (o)
      7'h33: return 2;  7'h13: return 4;  7'h03: return 6;  7'h23: return 9;
      7'h63: return 11; 7'h6f: return 14; 7'h67: return 16;
      default: return 18;
    endcase
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog"); finish_tb();
  end
  initial begin
    int exp;
    logic [6:0] ops [8];
    ops = '{7'h33, 7'h13, 7'h03, 7'h23, 7'h63, 7'h6f, 7'h67, 7'h7f};
    @(negedge clk);
    check(upc == 0, "reset to fetch");
    rst_n = 1;
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      seq = useq_e'($urandom_range(0, 3));
      opcode = ops[$urandom_range(0, 7)];
      cond = $urandom_range(0, 1);
      case (seq)
        SEQ_NEXT: exp = (int'(upc) + 1) % 32;
        SEQ_DISPATCH: exp = target(opcode);
        SEQ_START: exp = 0;
        default: exp = cond ? (int'(upc) + 1) % 32 : 0;
      endcase
      #1 check(retire == (exp == 0), "retire flag");
      @(posedge clk); #1;
      check(int'(upc) == exp, $sformatf("seq %s upc %0d exp %0d", seq.name(), upc, exp));
    end
    finish_tb();
  end
endmodule
