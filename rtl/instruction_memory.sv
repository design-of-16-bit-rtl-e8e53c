// instruction_memory: the program store of the Harvard core.
//
// 2^AW words of 24 bits, read asynchronously at the program counter's
// address: instr = IM[addr] in the same cycle. The core never writes it; a
// separate load port (ld_we, ld_addr, ld_data, synchronous write) lets a host
// place a program in it before releasing reset.
//
// A 24-bit wide memory addressed by the 16-bit program counter follows the
// processor description. The asynchronous read and the load port are this
// design's choices; the default depth (64K words) is the full range of the
// 16-bit program counter.
module instruction_memory
  import risc16_pkg::*;
#(
  parameter int unsigned AW = ADDR_W
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  output instr_t        instr,
  input  logic          ld_we,
  input  logic [AW-1:0] ld_addr,
  input  instr_t        ld_data
);

  instr_t mem [2**AW];

  always_ff @(posedge clk) begin
    if (ld_we) mem[ld_addr] <= ld_data;
  end

  assign instr = mem[addr];

endmodule
