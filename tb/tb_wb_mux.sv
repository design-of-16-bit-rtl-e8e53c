// tb_wb_mux: self-checking test of the write-back multiplexer.
//
// For random source values and every select code, checks that the output is
// the ALU result (1), the immediate (2), the memory word (3) or zero (0).
module tb_wb_mux;
  import risc16_pkg::*;

  wb_sel_e sel;
  word_t   alu_result, immediate, mem_data, wr_data, expected;
  int checks = 0, failures = 0;

  wb_mux dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 500; i++) begin
      alu_result = 16'($urandom); immediate = 16'($urandom); mem_data = 16'($urandom);
      for (int s = 0; s < 4; s++) begin
        sel = wb_sel_e'(s);
        #1;
        expected = (s == 1) ? alu_result : (s == 2) ? immediate : (s == 3) ? mem_data : 16'h0;
        checks++;
        if (wr_data !== expected) begin
          failures++;
          $display("FAIL sel=%0d out=%h expected %h", s, wr_data, expected);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
