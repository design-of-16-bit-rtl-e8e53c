// register_file: sixteen 16-bit general purpose registers R0..R15.
//
// Two asynchronous read ports (rx_addr -> rx_value, ry_addr -> ry_value) and
// one synchronous write port: when reg_wr is high at a rising clock edge,
// wr_data is written into the register selected by wr_addr. All registers are
// ordinary storage; R0 is not hard-wired to zero. A write is seen on the read
// ports from the next cycle.
//
// The size, the port count and the reg_wr write enable follow the processor
// description. Clearing every register on reset is this design's choice.
module register_file
  import risc16_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  reg_wr,
  input  ridx_t wr_addr,
  input  word_t wr_data,
  input  ridx_t rx_addr,
  input  ridx_t ry_addr,
  output word_t rx_value,
  output word_t ry_value
);

  word_t regs [NREGS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (reg_wr) begin
      regs[wr_addr] <= wr_data;
    end
  end

  assign rx_value = regs[rx_addr];
  assign ry_value = regs[ry_addr];

endmodule
