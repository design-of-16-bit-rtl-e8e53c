// wb_mux: register write-back multiplexer.
//
// Chooses the data written into the destination register: sel = 1 the ALU
// result, 2 the immediate value of MVI, 3 the word read from data memory by
// LOAD. With sel = 0 (no write-back in this state) the output is zero.
// Purely combinational.
//
// The three sources and the select codes follow the processor's datapath
// and simulation traces; the zero output for sel = 0 is this design's choice.
module wb_mux
  import risc16_pkg::*;
(
  input  wb_sel_e sel,
  input  word_t   alu_result,
  input  word_t   immediate,
  input  word_t   mem_data,
  output word_t   wr_data
);

  always_comb begin
    unique case (sel)
      SEL_ALU: wr_data = alu_result;
      SEL_IMM: wr_data = immediate;
      SEL_MEM: wr_data = mem_data;
      default: wr_data = '0;
    endcase
  end

endmodule
