// tb_trace_example: cycle-by-cycle run of the reference example program.
//
// Program (instruction memory 0000H-0005H), data memory word 0004H = 0003H:
//   0000  c10005  MVI  R1, 0005
//   0001  d20004  LOAD R2, 0004
//   0002  131200  ADD  R3, R1, R2   -> 0008
//   0003  241200  SUB  R4, R1, R2   -> 0002
//   0004  351200  MUL  R5, R1, R2   -> 000f, parity flag set
//   0005  000000  HLT
// For every cycle the testbench compares the control unit state, the
// strobes, the write-back select and, in the write-back state, the value on
// the register write data bus against a table derived from the state
// machine: MVI visits S0 S1 S2 S10 S11, LOAD S0 S1 S3 S4 S10 S11, the ALU
// operations S0 S1 S5 S6 S10 S11. It then checks the register contents, the
// flags and that the core stays halted. Total: 29 cycles before the HLT is
// fetched.
module tb_trace_example;
  import risc16_pkg::*;

  logic        clk;
  logic        rst;
  logic        im_ld_we = 1'b0, dm_ld_we = 1'b0;
  logic [15:0] im_ld_addr = '0, dm_ld_addr = '0;
  instr_t      im_ld_data = '0, instruction;
  word_t       dm_ld_wdata = '0, dm_ld_rdata;
  logic [15:0] pc;
  state_e      state;
  logic        halted, carry_flag, zero_flag, parity_flag;

  risc16 dut (.*);

  initial clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (state %0d pc %h)", what, state, pc); end
  endtask

  localparam instr_t PROG [6] = '{24'hc10005, 24'hd20004, 24'h131200, 24'h241200,
                                   24'h351200, 24'h000000};

  // expected state path and the value written back for each instruction
  task automatic expect_instr(input int states[$], input int wb_state, input word_t wb_value,
                              input logic [15:0] addr);
    foreach (states[i]) begin
      chk(int'(state) == states[i], $sformatf("state %0d expected", states[i]));
      chk(pc == addr, "program counter during the instruction");
      chk(dut.reg_wr == (states[i] == wb_state), "reg_wr");
      chk(dut.mem_rd == (states[i] == 3), "mem_rd");
      chk(dut.mem_wr == 1'b0, "mem_wr");
      chk(dut.pc_en == (states[i] == 11), "pc_en");
      chk(dut.jmp == 1'b0, "jmp");
      chk(dut.sel == ((states[i] == 2) ? SEL_IMM : (states[i] == 4) ? SEL_MEM :
                      (states[i] == 6) ? SEL_ALU : SEL_NONE), "sel");
      if (states[i] == wb_state)
        chk(dut.reg_wr_data == wb_value, $sformatf("reg_wr_data %h expected %h",
            dut.reg_wr_data, wb_value));
      if (states[i] >= 1)
        chk(instruction == PROG[addr[2:0]], "instruction register");
      @(posedge clk); #1;
    end
  endtask

  initial begin
    rst = 1'b1;
    @(posedge clk); #1;
    im_ld_we = 1'b1;
    foreach (PROG[a]) begin
      im_ld_addr = 16'(a); im_ld_data = PROG[a];
      @(posedge clk); #1;
    end
    im_ld_we = 1'b0;
    dm_ld_we = 1'b1; dm_ld_addr = 16'h0004; dm_ld_wdata = 16'h0003;
    @(posedge clk); #1;
    dm_ld_we = 1'b0;
    rst = 1'b0;
    expect_instr('{0, 1, 2, 10, 11},    2, 16'h0005, 16'h0000);
    expect_instr('{0, 1, 3, 4, 10, 11}, 4, 16'h0003, 16'h0001);
    chk(dut.mem_value == 16'h0003, "data_mem_value after LOAD");
    expect_instr('{0, 1, 5, 6, 10, 11}, 6, 16'h0008, 16'h0002);
    chk({carry_flag, zero_flag, parity_flag} == 3'b000, "flags after ADD 0008");
    expect_instr('{0, 1, 5, 6, 10, 11}, 6, 16'h0002, 16'h0003);
    chk({carry_flag, zero_flag, parity_flag} == 3'b000, "flags after SUB 0002");
    expect_instr('{0, 1, 5, 6, 10, 11}, 6, 16'h000f, 16'h0004);
    chk({carry_flag, zero_flag, parity_flag} == 3'b001, "parity set after MUL 000f");
    chk(pc == 16'h0005, "pc at HLT");
    repeat (2) begin @(posedge clk); #1; end
    for (int i = 0; i < 10; i++) begin
      chk(halted && state == S9 && pc == 16'h0005, "halted in S9");
      @(posedge clk); #1;
    end
    chk(dut.u_rf.regs[1] == 16'h0005 && dut.u_rf.regs[2] == 16'h0003 &&
        dut.u_rf.regs[3] == 16'h0008 && dut.u_rf.regs[4] == 16'h0002 &&
        dut.u_rf.regs[5] == 16'h000f, "final register contents");
    dm_ld_addr = 16'h0004; #1;
    chk(dm_ld_rdata == 16'h0003, "DM[0004] unchanged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
