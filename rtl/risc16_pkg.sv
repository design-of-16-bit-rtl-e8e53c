// risc16_pkg: types and constants shared by the 16-bit multicycle RISC core.
//
// The instruction word is 24 bits: opcode in [23:20], destination register Rz
// in [19:16], and a 16-bit field [15:0] that holds either an immediate value,
// a data memory address, a jump offset, or the two source registers Rx [15:12]
// and Ry [11:8]. The opcode values, the state numbering S0..S12 and the
// write-back select codes follow the processor's published description; the
// exact field placement of Rx and Ry is read from its example encodings
// (24'h131200 = ADD R3,R1,R2).
package risc16_pkg;

  localparam int unsigned DATA_W  = 16;  // register and data memory width
  localparam int unsigned INSTR_W = 24;  // instruction word width
  localparam int unsigned ADDR_W  = 16;  // program counter / data address width
  localparam int unsigned NREGS   = 16;  // general purpose registers R0..R15
  localparam int unsigned RIDX_W  = 4;   // register index width

  typedef logic [DATA_W-1:0]  word_t;
  typedef logic [INSTR_W-1:0] instr_t;
  typedef logic [RIDX_W-1:0]  ridx_t;

  // Table of the sixteen instructions.
  typedef enum logic [3:0] {
    OP_HLT   = 4'h0,  // stop
    OP_ADD   = 4'h1,  // Rz = Rx + Ry
    OP_SUB   = 4'h2,  // Rz = Rx - Ry
    OP_MUL   = 4'h3,  // Rz = Rx * Ry (low 16 bits)
    OP_AND   = 4'h4,  // Rz = Rx & Ry
    OP_OR    = 4'h5,  // Rz = Rx | Ry
    OP_XOR   = 4'h6,  // Rz = Rx ^ Ry
    OP_NOT   = 4'h7,  // Rz = ~Rx
    OP_SHL   = 4'h8,  // Rz = Rx << 1
    OP_SHR   = 4'h9,  // Rz = Rx >> 1
    OP_INC   = 4'ha,  // Rz = Rx + 1
    OP_DEC   = 4'hb,  // Rz = Rx - 1
    OP_MVI   = 4'hc,  // Rz = immediate
    OP_LOAD  = 4'hd,  // Rz = DM[address]
    OP_STORE = 4'he,  // DM[address] = Rz
    OP_JUMP  = 4'hf   // PC = PC + signed offset
  } opcode_e;

  // Control unit states; the numeric code equals the state index.
  typedef enum logic [3:0] {
    S0  = 4'h0,  // idle / fetch: instruction register loads IM[PC]
    S1  = 4'h1,  // decode
    S2  = 4'h2,  // MVI: write immediate
    S3  = 4'h3,  // LOAD phase 1: read data memory
    S4  = 4'h4,  // LOAD phase 2: write register
    S5  = 4'h5,  // ALU phase 1: read operands
    S6  = 4'h6,  // ALU phase 2: write result
    S7  = 4'h7,  // STORE phase 1: read register
    S8  = 4'h8,  // STORE phase 2: write data memory
    S9  = 4'h9,  // halted
    S10 = 4'ha,  // one-cycle delay
    S11 = 4'hb,  // advance program counter
    S12 = 4'hc   // jump
  } state_e;

  // Write-back multiplexer select.
  typedef enum logic [1:0] {
    SEL_NONE = 2'h0,  // nothing selected, write data is zero
    SEL_ALU  = 2'h1,  // ALU result
    SEL_IMM  = 2'h2,  // immediate value from the instruction
    SEL_MEM  = 2'h3   // value read from data memory
  } wb_sel_e;

  function automatic logic is_alu_op(opcode_e op);
    return (op >= OP_ADD) && (op <= OP_DEC);
  endfunction

endpackage
