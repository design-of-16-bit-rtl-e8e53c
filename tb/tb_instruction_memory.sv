// tb_instruction_memory: self-checking test of the instruction memory.
//
// Uses a reduced depth (256 words) so the reference copy stays small. Writes
// every word through the load port with a value computed from its address,
// then reads them back in random order on the fetch port, and checks that the
// read is combinational (same cycle as the address change).
module tb_instruction_memory;
  import risc16_pkg::*;
  localparam int unsigned AW = 8;

  logic          clk;
  logic [AW-1:0] addr, ld_addr;
  instr_t        instr, ld_data;
  logic          ld_we;
  int checks = 0, failures = 0;

  instruction_memory #(.AW(AW)) dut (.*);

  initial clk = 1'b0;
  always #5 clk = ~clk;

  function automatic instr_t pattern(int a);
    return instr_t'(a * 'h01a3c5) ^ 24'h5a5a5a;
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ld_we = 1'b0; ld_addr = '0; ld_data = '0; addr = '0;
    @(posedge clk); #1;
    for (int a = 0; a < 2**AW; a++) begin
      ld_we = 1'b1; ld_addr = AW'(a); ld_data = pattern(a);
      @(posedge clk); #1;
    end
    ld_we = 1'b0;
    for (int i = 0; i < 1000; i++) begin
      automatic int a = $urandom_range(2**AW - 1);
      addr = AW'(a);
      #1;
      checks++;
      if (instr !== pattern(a)) begin
        failures++;
        $display("FAIL IM[%0d]=%h expected %h", a, instr, pattern(a));
      end
    end
    // an overwrite is visible after the clock edge
    ld_we = 1'b1; ld_addr = 8'd7; ld_data = 24'hc10005; addr = 8'd7;
    @(posedge clk); #1;
    ld_we = 1'b0;
    checks++;
    if (instr !== 24'hc10005) begin failures++; $display("FAIL overwrite"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
