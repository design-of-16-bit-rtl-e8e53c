// risc16: a 16-bit multicycle RISC processor with a Harvard memory system.
//
// Fetch unit: the program counter addresses the 24-bit instruction memory.
// Decode unit: the instruction register captures and splits the word, the
// control unit sequences the instruction, and the register file supplies the
// operands. Execute unit: the ALU computes on Rx/Ry, and the write-back
// multiplexer returns the ALU result, the MVI immediate or the LOAD data to
// register Rz. STORE writes Rz to the data memory. Flags {C,Z,P} are updated
// whenever an ALU result is written back.
//
// Timing (cycles per instruction, from the control unit's FSM): MVI 5,
// LOAD 6, ALU operations 6, STORE 6, JUMP 3; HLT stops the core in S9.
//
// Host interface: while rst is high the host may fill the instruction memory
// (im_ld_*) and the data memory (dm_ld_*); dm_ld_rdata reads the data memory
// combinationally at dm_ld_addr at any time. After rst falls the core starts
// at address 0000H. pc, state, the instruction register, halted and the
// flags are exported for
// observation.
//
// The block structure and wiring follow the processor's architecture
// diagram. The host load ports and the exported status signals are this
// design's own additions. Parameters IM_AW/DM_AW set the memory depths; their
// defaults cover the full 16-bit address range.
module risc16
  import risc16_pkg::*;
#(
  parameter int unsigned IM_AW = ADDR_W,
  parameter int unsigned DM_AW = ADDR_W
) (
  input  logic             clk,
  input  logic             rst,
  // instruction memory load port
  input  logic             im_ld_we,
  input  logic [IM_AW-1:0] im_ld_addr,
  input  instr_t           im_ld_data,
  // data memory host port
  input  logic             dm_ld_we,
  input  logic [DM_AW-1:0] dm_ld_addr,
  input  word_t            dm_ld_wdata,
  output word_t            dm_ld_rdata,
  // status
  output logic [ADDR_W-1:0] pc,
  output state_e           state,
  output instr_t           instruction,
  output logic             halted,
  output logic             carry_flag,
  output logic             zero_flag,
  output logic             parity_flag
);

  // control
  logic    pc_en, jmp, reg_wr, mem_rd, mem_wr;
  wb_sel_e sel;

  // fetch / decode
  instr_t  im_data;
  opcode_e opcode;
  ridx_t   rz, rx, ry;
  word_t   immediate, address;

  // datapath
  word_t   rx_value, ry_value, alu_result, mem_value, reg_wr_data;

  program_counter #(.AW(ADDR_W)) u_pc (
    .clk, .rst, .pc_en, .jmp, .offset(address), .pc
  );

  instruction_memory #(.AW(IM_AW)) u_imem (
    .clk, .addr(pc[IM_AW-1:0]), .instr(im_data),
    .ld_we(im_ld_we), .ld_addr(im_ld_addr), .ld_data(im_ld_data)
  );

  instruction_register u_ir (
    .clk, .rst, .instr_in(im_data), .ir(instruction), .opcode, .rz, .rx, .ry,
    .immediate, .address
  );

  control_unit u_cu (
    .clk, .rst, .opcode, .pc_en, .jmp, .reg_wr, .mem_rd, .mem_wr, .sel,
    .halted, .pstate(state)
  );

  register_file u_rf (
    .clk, .rst, .reg_wr, .wr_addr(rz), .wr_data(reg_wr_data),
    .rx_addr(rx), .ry_addr(ry), .rx_value, .ry_value
  );

  alu u_alu (
    .clk, .rst, .opcode, .a(rx_value), .b(ry_value),
    .flag_en(reg_wr && (sel == SEL_ALU)), .result(alu_result),
    .carry_flag, .zero_flag, .parity_flag
  );

  wb_mux u_mux (
    .sel, .alu_result, .immediate, .mem_data(mem_value), .wr_data(reg_wr_data)
  );

  data_memory #(.AW(DM_AW)) u_dmem (
    .clk, .rst, .mem_rd, .mem_wr, .addr(address[DM_AW-1:0]), .wr_data(rx_value),
    .rd_data(mem_value), .ld_we(dm_ld_we), .ld_addr(dm_ld_addr),
    .ld_wdata(dm_ld_wdata), .ld_rdata(dm_ld_rdata)
  );

endmodule
