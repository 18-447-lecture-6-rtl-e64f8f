// tick_sequencer: sequential control of the Ver 1.0 multi-cycle core.
//
// The single-cycle datapath is clocked at one fine tick (50 ps in the
// lecture's numbers) and its architectural state only updates on the edge
// where MasterEn is 1. This block counts the ticks each instruction needs:
// a state register plus a ROM, addressed by {state, instruction class},
// that literally holds the next-state/MasterEn truth table:
//
//   IF1 IF2 IF3 -> next;  IF4 -> ID (JAL: EX1);  ID -> EX1;  EX1 -> EX2
//   EX2 -> WB (R/I-type), MEM1 (LW, SW), IF1 with MasterEn (Bxx, JAL, JALR)
//   MEM1..MEM3 -> next;  MEM4 -> WB (LW), IF1 with MasterEn (SW)
//   WB  -> IF1 with MasterEn
//
// giving 8, 12, 11, 7, 7 and 6 ticks for R/I-type, LW, SW, Bxx, JALR and
// JAL. The states and transitions are the lecture's; the state encoding and
// the choice to sequence unknown opcodes like R/I-type are this design's.
// MasterEn is a Mealy output of the current state and class. Asynchronous
// active-low reset enters IF1.
module tick_sequencer
  import rv_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  iclass_e iclass,
  output logic    master_en,
  output logic [3:0] state
);
  typedef enum logic [3:0] {
    S_IF1, S_IF2, S_IF3, S_IF4, S_ID, S_EX1, S_EX2,
    S_MEM1, S_MEM2, S_MEM3, S_MEM4, S_WB
  } tstate_e;

  localparam int ROWS = 128;  // 2^(4 state bits + 3 class bits)
  localparam int W    = 5;    // {next state, MasterEn}

  function automatic logic [W-1:0] row(input tstate_e s, input iclass_e c);
    tstate_e n;
    logic    me;
    me = 1'b0;
    case (s)
      S_IF1:  n = S_IF2;
      S_IF2:  n = S_IF3;
      S_IF3:  n = S_IF4;
      S_IF4:  n = (c == CL_JAL) ? S_EX1 : S_ID;
      S_ID:   n = S_EX1;
      S_EX1:  n = S_EX2;
      S_EX2:  case (c)
                CL_LW, CL_SW:             n = S_MEM1;
                CL_BXX, CL_JAL, CL_JALR:  begin n = S_IF1; me = 1'b1; end
                default:                  n = S_WB;
              endcase
      S_MEM1: n = S_MEM2;
      S_MEM2: n = S_MEM3;
      S_MEM3: n = S_MEM4;
      S_MEM4: if (c == CL_LW) n = S_WB;
              else begin n = S_IF1; me = 1'b1; end
      S_WB:   begin n = S_IF1; me = 1'b1; end
      default: n = S_IF1;
    endcase
    return {n, me};
  endfunction

  function automatic logic [ROWS*W-1:0] build_rom();
    logic [ROWS*W-1:0] r;
    for (int i = 0; i < ROWS; i++)
      r[i*W +: W] = row(tstate_e'(i[6:3]), iclass_e'(i[2:0]));
    return r;
  endfunction

  localparam logic [ROWS*W-1:0] ROM = build_rom();

  logic [W-1:0] out;
  assign out       = ROM[{state, iclass} * W +: W];
  assign master_en = out[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= S_IF1;
    else        state <= out[W-1:1];
  end
endmodule
