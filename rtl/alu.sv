// alu: 16-bit arithmetic logic unit with the carry/zero/parity flag register.
//
// The result is combinational in the opcode and the two operands, so it is
// valid while the control unit sits in S5/S6. Eleven operations:
//   ADD a+b, SUB a-b, MUL a*b (low 16 bits), AND, OR, XOR, NOT ~a,
//   SHL a<<1, SHR a>>1 (logical), INC a+1, DEC a-1.
// Every other opcode gives a zero result.
// The flags are computed next to the result and captured in the 3-bit flag
// register {C, Z, P} when flag_en is high at a rising clock edge (the core
// raises flag_en in the cycle that writes an ALU result back):
//   Z = result is zero
//   P = even parity: high when the result holds an even number of ones
//   C = carry out of ADD and INC; borrow of SUB and DEC; the bit shifted out
//       by SHL and SHR; for MUL, set when the product does not fit in 16 bits;
//       zero for the logic operations.
// Reset clears the flag register.
//
// The operation list, the 16-bit width and the three flags follow the
// processor description, as does the parity sense (a result of 000fH sets
// P). How carry is defined for each operation, the single-bit shift distance
// and the moment the flags are captured are this design's choices.
module alu
  import risc16_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  opcode_e opcode,
  input  word_t   a,
  input  word_t   b,
  input  logic    flag_en,
  output word_t   result,
  output logic    carry_flag,
  output logic    zero_flag,
  output logic    parity_flag
);

  logic            carry;
  logic [DATA_W:0] wide;
  logic [2*DATA_W-1:0] prod;

  always_comb begin
    wide   = '0;
    prod   = a * b;
    carry  = 1'b0;
    result = '0;
    unique case (opcode)
      OP_ADD: begin wide = {1'b0, a} + {1'b0, b}; result = wide[DATA_W-1:0]; carry = wide[DATA_W]; end
      OP_SUB: begin wide = {1'b0, a} - {1'b0, b}; result = wide[DATA_W-1:0]; carry = wide[DATA_W]; end
      OP_MUL: begin result = prod[DATA_W-1:0]; carry = |prod[2*DATA_W-1:DATA_W]; end
      OP_AND: result = a & b;
      OP_OR:  result = a | b;
      OP_XOR: result = a ^ b;
      OP_NOT: result = ~a;
      OP_SHL: begin result = {a[DATA_W-2:0], 1'b0}; carry = a[DATA_W-1]; end
      OP_SHR: begin result = {1'b0, a[DATA_W-1:1]}; carry = a[0]; end
      OP_INC: begin wide = {1'b0, a} + 1'b1; result = wide[DATA_W-1:0]; carry = wide[DATA_W]; end
      OP_DEC: begin wide = {1'b0, a} - 1'b1; result = wide[DATA_W-1:0]; carry = wide[DATA_W]; end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      carry_flag  <= 1'b0;
      zero_flag   <= 1'b0;
      parity_flag <= 1'b0;
    end else if (flag_en) begin
      carry_flag  <= carry;
      zero_flag   <= (result == '0);
      parity_flag <= ~^result;
    end
  end

endmodule
