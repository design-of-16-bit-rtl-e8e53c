// control_unit: the sequencing finite state machine of the multicycle core.
//
// A Moore machine with thirteen states S0..S12. Every instruction starts in
// S0 (fetch: the instruction register captures IM[PC]) and S1 (decode), then
// follows one path chosen by the opcode:
//   MVI      S2 (reg_wr, sel=IMM)                    -> S10 -> S11 -> S0
//   LOAD     S3 (mem_rd) -> S4 (reg_wr, sel=MEM)     -> S10 -> S11 -> S0
//   ALU ops  S5 (operand read) -> S6 (reg_wr, sel=ALU) -> S10 -> S11 -> S0
//   STORE    S7 (register read) -> S8 (mem_wr)       -> S10 -> S11 -> S0
//   JUMP     S12 (jmp)                                -> S0
//   HLT      S9, which is never left until reset.
// S10 is a one-cycle delay and S11 raises pc_en so the program counter steps
// to the next word. An instruction therefore takes 5 cycles (MVI), 6 cycles
// (LOAD, ALU, STORE) or 3 cycles (JUMP).
//
// The states, transitions and the control levels in each state follow the
// processor's published FSM. The write-back select codes (1 ALU, 2 immediate,
// 3 memory, 0 otherwise) follow its simulation traces. Design choices: the
// reset is synchronous and active high, outputs are decoded from the present
// state only, and a 'halted' flag (state S9) is exported for observation.
//
// Interface: clk, rst, opcode (from the instruction register); outputs
// pc_en, jmp, reg_wr, mem_rd, mem_wr, sel, halted and the present state.
module control_unit
  import risc16_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  opcode_e opcode,
  output logic    pc_en,
  output logic    jmp,
  output logic    reg_wr,
  output logic    mem_rd,
  output logic    mem_wr,
  output wb_sel_e sel,
  output logic    halted,
  output state_e  pstate
);

  state_e nstate;

  always_ff @(posedge clk) begin
    if (rst) pstate <= S0;
    else     pstate <= nstate;
  end

  // Next-state logic: the transitions of the FSM diagram.
  always_comb begin
    unique case (pstate)
      S0: nstate = S1;
      S1: begin
        if      (opcode == OP_HLT)   nstate = S9;
        else if (opcode == OP_MVI)   nstate = S2;
        else if (opcode == OP_LOAD)  nstate = S3;
        else if (opcode == OP_STORE) nstate = S7;
        else if (opcode == OP_JUMP)  nstate = S12;
        else                         nstate = S5;  // the eleven ALU operations
      end
      S2:  nstate = S10;
      S3:  nstate = S4;
      S4:  nstate = S10;
      S5:  nstate = S6;
      S6:  nstate = S10;
      S7:  nstate = S8;
      S8:  nstate = S10;
      S9:  nstate = S9;
      S10: nstate = S11;
      S11: nstate = S0;
      S12: nstate = S0;
      default: nstate = S0;
    endcase
  end

  // Moore outputs.
  always_comb begin
    pc_en  = 1'b0;
    jmp    = 1'b0;
    reg_wr = 1'b0;
    mem_rd = 1'b0;
    mem_wr = 1'b0;
    sel    = SEL_NONE;
    unique case (pstate)
      S2:  begin reg_wr = 1'b1; sel = SEL_IMM; end
      S3:  mem_rd = 1'b1;
      S4:  begin reg_wr = 1'b1; sel = SEL_MEM; end
      S6:  begin reg_wr = 1'b1; sel = SEL_ALU; end
      S8:  mem_wr = 1'b1;
      S11: pc_en = 1'b1;
      S12: jmp = 1'b1;
      default: ;
    endcase
  end

  assign halted = (pstate == S9);

  // At most one of the sequencing/memory strobes is active in any state.
  a_onehot_strobes: assert property (@(posedge clk) disable iff (rst)
    $onehot0({pc_en, jmp, reg_wr, mem_rd, mem_wr}));

endmodule
