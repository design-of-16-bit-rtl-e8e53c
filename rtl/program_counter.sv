// program_counter: the 16-bit program counter of the fetch unit.
//
// On reset the counter points at the first instruction word, 0000H. When
// pc_en is high at a rising clock edge it advances by one; when jmp is high
// it moves by the signed 16-bit offset carried in the JUMP instruction, i.e.
// PC <= PC + offset, so a negative offset jumps backwards. jmp has priority
// over pc_en (the control unit never raises both). The value wraps modulo
// 2^16.
//
// The increment and the relative jump follow the processor description.
// That the offset is a two's complement number added to the address of the
// JUMP instruction itself, and that reset is synchronous, are this design's
// choices.
module program_counter
  import risc16_pkg::*;
#(
  parameter int unsigned AW = ADDR_W
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          pc_en,
  input  logic          jmp,
  input  logic [15:0]   offset,
  output logic [AW-1:0] pc
);

  always_ff @(posedge clk) begin
    if (rst)        pc <= '0;
    else if (jmp)   pc <= pc + AW'(signed'(offset));
    else if (pc_en) pc <= pc + AW'(1);
  end

endmodule
