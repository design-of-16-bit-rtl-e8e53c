// data_memory: the data store of the Harvard core, 2^AW words of 16 bits.
//
// Core port: when mem_rd is high at a rising clock edge the word at addr is
// copied into the output register rd_data, where it stays until the next
// read (LOAD reads in S3 and writes the register from rd_data in S4). When
// mem_wr is high at a rising clock edge wr_data is written at addr (STORE,
// state S8).
// Host port: ld_we writes ld_wdata at ld_addr on a rising edge, and ld_rdata
// shows the word at ld_addr combinationally; a host uses it to place data
// before a run and to inspect results after it. A core write and a host write
// to the same word in the same cycle leave the core's data.
// rd_data is cleared by reset; the array itself is not.
//
// Reading on mem_rd and writing on mem_wr follow the processor description.
// The registered read, the host port and the default depth (64K words, the
// whole 16-bit address field of LOAD and STORE) are this design's choices.
module data_memory
  import risc16_pkg::*;
#(
  parameter int unsigned AW = ADDR_W
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          mem_rd,
  input  logic          mem_wr,
  input  logic [AW-1:0] addr,
  input  word_t         wr_data,
  output word_t         rd_data,
  input  logic          ld_we,
  input  logic [AW-1:0] ld_addr,
  input  word_t         ld_wdata,
  output word_t         ld_rdata
);

  word_t mem [2**AW];

  always_ff @(posedge clk) begin
    if (ld_we)  mem[ld_addr] <= ld_wdata;
    if (mem_wr) mem[addr]    <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rst)         rd_data <= '0;
    else if (mem_rd) rd_data <= mem[addr];
  end

  assign ld_rdata = mem[ld_addr];

endmodule
