// instruction_register: 24-bit instruction register and field decoder.
//
// The register captures the instruction memory output at every rising clock
// edge (it has no enable of its own: the program counter only moves in S11 or
// S12, so the word it holds is stable from S1 to the end of the
// instruction). Reset clears it, which decodes as HLT. The held word is split
// into fields; which of them are driven depends on the opcode:
//   opcode [23:20]  always
//   Rz     [19:16]  always (destination; also the source of STORE)
//   Rx     [15:12]  for the ALU operations
//   Ry     [11:8]   for the two-operand ALU operations
//   Rx     = Rz     for STORE, so that the stored register is read on the
//                   first register read port
//   immediate [15:0]  for MVI
//   address   [15:0]  for LOAD, STORE and JUMP (signed offset for JUMP)
// A field that the opcode does not use reads as zero.
//
// Field positions follow the processor's instruction format and its example
// encodings. Zeroing unused fields, routing Rz to the Rx port for STORE and
// carrying the JUMP offset on the address field are this design's choices.
module instruction_register
  import risc16_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  instr_t  instr_in,
  output instr_t  ir,
  output opcode_e opcode,
  output ridx_t   rz,
  output ridx_t   rx,
  output ridx_t   ry,
  output word_t   immediate,
  output word_t   address
);

  always_ff @(posedge clk) begin
    if (rst) ir <= '0;
    else     ir <= instr_in;
  end

  always_comb begin
    opcode    = opcode_e'(ir[23:20]);
    rz        = ir[19:16];
    rx        = '0;
    ry        = '0;
    immediate = '0;
    address   = '0;
    if (is_alu_op(opcode)) begin
      rx = ir[15:12];
      ry = ir[11:8];
    end
    unique case (opcode)
      OP_MVI:                     immediate = ir[15:0];
      OP_LOAD, OP_JUMP:           address   = ir[15:0];
      OP_STORE: begin
        address = ir[15:0];
        rx      = ir[19:16];
      end
      default: ;
    endcase
  end

endmodule
