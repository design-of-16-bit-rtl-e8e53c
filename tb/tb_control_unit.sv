// tb_control_unit: self-checking test of the sequencing FSM.
//
// For every one of the sixteen opcodes the testbench releases the FSM from
// S0 and follows it cycle by cycle against an expected list of states and
// control levels written out by hand from the state diagram. It checks the
// cycle count of each instruction (MVI 5, LOAD/ALU/STORE 6, JUMP 3), that
// HLT stays in S9, and that reset returns the machine to S0 from any state.
module tb_control_unit;
  import risc16_pkg::*;

  logic    clk;
  logic    rst;
  opcode_e opcode;
  logic    pc_en, jmp, reg_wr, mem_rd, mem_wr, halted;
  wb_sel_e sel;
  state_e  pstate;

  int checks = 0, failures = 0;

  control_unit dut (.*);

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (state %s op %s)", what, pstate.name(), opcode.name());
    end
  endtask

  // expected control word for a state: {pc_en, jmp, reg_wr, mem_rd, mem_wr, sel}
  function automatic logic [6:0] expect_ctl(int s);
    case (s)
      2:  return {5'b00100, 2'd2};
      3:  return {5'b00010, 2'd0};
      4:  return {5'b00100, 2'd3};
      6:  return {5'b00100, 2'd1};
      8:  return {5'b00001, 2'd0};
      11: return {5'b10000, 2'd0};
      12: return {5'b01000, 2'd0};
      default: return 7'd0;
    endcase
  endfunction

  task automatic run_path(input opcode_e op, input int path[$]);
    int n;
    opcode = op;
    n = 0;
    // pstate is S0 here
    foreach (path[i]) begin
      check(int'(pstate) == path[i], $sformatf("state %0d expected at step %0d", path[i], i));
      check({pc_en, jmp, reg_wr, mem_rd, mem_wr, sel} == expect_ctl(path[i]),
            $sformatf("control word in S%0d", path[i]));
      check(halted == (path[i] == 9), "halted flag");
      @(posedge clk); #1;
      n++;
    end
    check(pstate == S0, "instruction returns to S0");
    check(n == path.size(), "cycle count");
  endtask

  initial begin
    opcode = OP_MVI;
    rst = 1'b1;
    repeat (3) @(posedge clk);
    #1;
    check(pstate == S0 && !pc_en && !jmp && !reg_wr && !mem_rd && !mem_wr, "S0 under reset");
    rst = 1'b0;
    run_path(OP_MVI,   '{0, 1, 2, 10, 11});
    run_path(OP_LOAD,  '{0, 1, 3, 4, 10, 11});
    run_path(OP_STORE, '{0, 1, 7, 8, 10, 11});
    run_path(OP_JUMP,  '{0, 1, 12});
    for (int op = 1; op <= 11; op++)
      run_path(opcode_e'(op), '{0, 1, 5, 6, 10, 11});
    // HLT: S0, S1, then S9 forever
    opcode = OP_HLT;
    @(posedge clk); #1;
    check(pstate == S1, "HLT decode");
    for (int i = 0; i < 10; i++) begin
      @(posedge clk); #1;
      opcode = opcode_e'($urandom_range(15));
      check(pstate == S9 && halted, "stays halted");
      check({pc_en, jmp, reg_wr, mem_rd, mem_wr} == 5'b0, "no strobes while halted");
    end
    // reset from the middle of an instruction
    rst = 1'b1;
    @(posedge clk); #1;
    check(pstate == S0, "reset from S9");
    rst = 1'b0;
    opcode = OP_LOAD;
    repeat (3) @(posedge clk);
    #1;
    check(pstate == S4, "in S4");
    rst = 1'b1;
    @(posedge clk); #1;
    check(pstate == S0, "reset from S4");
    rst = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
