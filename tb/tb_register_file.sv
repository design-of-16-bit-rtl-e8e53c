// tb_register_file: self-checking test of the 16 x 16-bit register file.
//
// Keeps a reference array, writes random registers with random data under a
// random reg_wr, and checks both read ports at random addresses every cycle.
// Also checks that reset clears all sixteen registers and that a write with
// reg_wr low changes nothing.
module tb_register_file;
  import risc16_pkg::*;

  logic  clk;
  logic  rst, reg_wr;
  ridx_t wr_addr, rx_addr, ry_addr;
  word_t wr_data, rx_value, ry_value;
  word_t model [16];
  int checks = 0, failures = 0;

  register_file dut (.*);

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_reads();
    for (int k = 0; k < 4; k++) begin
      rx_addr = 4'($urandom); ry_addr = 4'($urandom);
      #1;
      checks++;
      if (rx_value !== model[rx_addr] || ry_value !== model[ry_addr]) begin
        failures++;
        $display("FAIL R%0d=%h (exp %h) R%0d=%h (exp %h)", rx_addr, rx_value,
                 model[rx_addr], ry_addr, ry_value, model[ry_addr]);
      end
    end
  endtask

  initial begin
    rst = 1'b1; reg_wr = 1'b0; wr_addr = '0; wr_data = '0; rx_addr = '0; ry_addr = '0;
    foreach (model[i]) model[i] = '0;
    @(posedge clk); #1;
    rst = 1'b0;
    for (int r = 0; r < 16; r++) begin
      rx_addr = 4'(r); #1;
      checks++;
      if (rx_value !== 16'h0) begin failures++; $display("FAIL reset R%0d", r); end
    end
    // fill every register once so later reads see distinct values
    for (int r = 0; r < 16; r++) begin
      reg_wr = 1'b1; wr_addr = 4'(r); wr_data = 16'(r * 16'h1111 + 16'h0101);
      @(posedge clk); #1;
      model[r] = wr_data;
    end
    check_reads();
    for (int i = 0; i < 3000; i++) begin
      reg_wr = 1'($urandom_range(1)); wr_addr = 4'($urandom); wr_data = 16'($urandom);
      @(posedge clk); #1;
      if (reg_wr) model[wr_addr] = wr_data;
      check_reads();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
