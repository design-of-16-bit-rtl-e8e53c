// tb_program_counter: self-checking test of the program counter.
//
// Drives random pc_en / jmp / offset sequences and compares the counter with
// a reference value kept in the testbench: reset gives 0000H, pc_en adds one,
// jmp adds the signed offset, neither holds the value. Wrap-around at both
// ends of the 16-bit range is exercised explicitly.
module tb_program_counter;
  logic        clk;
  logic        rst, pc_en, jmp;
  logic [15:0] offset, pc, ref_pc;
  int checks = 0, failures = 0;

  program_counter dut (.*);

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic en, input logic j, input logic [15:0] off);
    pc_en = en; jmp = j; offset = off;
    @(posedge clk); #1;
    if (j)       ref_pc = ref_pc + off;
    else if (en) ref_pc = ref_pc + 16'd1;
    checks++;
    if (pc !== ref_pc) begin
      failures++;
      $display("FAIL pc=%h expected %h (en=%b jmp=%b off=%h)", pc, ref_pc, en, j, off);
    end
  endtask

  initial begin
    rst = 1'b1; pc_en = 1'b0; jmp = 1'b0; offset = '0;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (pc !== 16'h0000) begin failures++; $display("FAIL reset value %h", pc); end
    rst = 1'b0;
    ref_pc = 16'h0000;
    step(1'b1, 1'b0, 16'h0);      // 1
    step(1'b1, 1'b0, 16'h0);      // 2
    step(1'b0, 1'b0, 16'h0);      // hold
    step(1'b0, 1'b1, 16'hfffe);   // 2 - 2 = 0
    step(1'b0, 1'b1, 16'hffff);   // wraps to ffff
    step(1'b1, 1'b0, 16'h0);      // wraps to 0000
    step(1'b0, 1'b1, 16'h0010);   // forward jump
    for (int i = 0; i < 1000; i++)
      step(1'($urandom_range(1)), 1'($urandom_range(3) == 0), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
