// tb_risc16: end-to-end test of the processor at its default sizes.
//
// The testbench holds an instruction-level reference model of the ISA
// (registers, flags, program counter, data memory) and runs the core in
// lockstep with it. Every time the core enters S1 (decode) the previous
// instruction has finished: the testbench then compares the program counter,
// all sixteen registers, the three flags and the cycle count of that
// instruction (MVI 5, LOAD/ALU/STORE 6, JUMP 3) with the model. After a run
// the data memory is compared word by word through the host port.
//
// Program 0 is the traced example of the original description (MVI R1,0005;
// LOAD R2,0004 with DM[0004]=0003; ADD R3,R1,R2; SUB R4,R1,R2; MUL R5,R1,R2)
// with its results 0008, 0002, 000f and the parity flag checked explicitly,
// followed by random code and HLT. The other programs are random mixes of all
// sixteen instructions with forward and backward jumps kept inside the
// program; a run ends at HLT or after a fixed number of instructions.
// Each mechanism (every opcode, a forward and a backward jump, halting, and
// each of the carry, zero and parity flags being set) is counted, and one
// that never happened counts as a failure.
module tb_risc16;
  import risc16_pkg::*;

  localparam int PLEN     = 96;   // words per test program
  localparam int DWORDS   = 256;  // data words initialised and compared
  localparam int NPROG    = 12;
  localparam int MAXINSTR = 400;

  logic        clk;
  logic        rst;
  logic        im_ld_we, dm_ld_we;
  logic [15:0] im_ld_addr, dm_ld_addr;
  instr_t      im_ld_data, instruction;
  word_t       dm_ld_wdata, dm_ld_rdata;
  logic [15:0] pc;
  state_e      state;
  logic        halted, carry_flag, zero_flag, parity_flag;

  risc16 dut (.*);

  initial clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int seen_op [16];
  int seen_fwd = 0, seen_back = 0, seen_halt = 0, seen_c = 0, seen_z = 0, seen_p = 0;

  // reference model state
  logic [23:0] prog [PLEN];
  word_t       m_reg [16];
  word_t       m_dm  [DWORDS];
  logic [15:0] m_pc;
  logic        m_c, m_z, m_p, m_halt;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (pc=%h)", what, m_pc); end
  endtask

  function automatic logic [23:0] enc(logic [3:0] op, logic [3:0] rz, logic [15:0] f);
    return {op, rz, f};
  endfunction
  function automatic logic [23:0] enc3(logic [3:0] op, logic [3:0] rz, logic [3:0] rx,
                                       logic [3:0] ry);
    return {op, rz, rx, ry, 8'h00};
  endfunction

  // random instruction at address a: data addresses stay below DWORDS and
  // jumps land inside the program
  function automatic logic [23:0] rand_instr(int a, bit allow_back);
    logic [3:0] op = 4'($urandom_range(1, 15));
    logic [3:0] rz = 4'($urandom);
    case (op)
      12: return enc(op, rz, $urandom_range(3) == 0 ? 16'h0 : 16'($urandom));
      13, 14: return enc(op, rz, 16'($urandom_range(DWORDS - 1)));
      15: begin
        int t;
        if (allow_back && $urandom_range(3) == 0) t = $urandom_range(a);
        else t = $urandom_range(a + 1, PLEN - 1);
        if (t == a) t = a + 1;
        return enc(op, 4'h0, 16'(t - a));
      end
      default: return enc3(op, rz, 4'($urandom), 4'($urandom));
    endcase
  endfunction

  // one instruction of the reference model; returns its cycle count
  function automatic int model_step(logic [23:0] w);
    logic [3:0]  op = w[23:20];
    logic [3:0]  rz = w[19:16];
    word_t       x  = m_reg[w[15:12]];
    word_t       y  = m_reg[w[11:8]];
    logic [31:0] r;
    logic        c  = 1'b0;
    int          cycles = 6;
    case (op)
      4'h0: begin m_halt = 1'b1; return 0; end
      4'hc: begin m_reg[rz] = w[15:0]; cycles = 5; end
      4'hd: m_reg[rz] = m_dm[w[7:0]];
      4'he: m_dm[w[7:0]] = m_reg[rz];
      4'hf: begin
        if (w[15]) seen_back++; else seen_fwd++;
        m_pc = m_pc + w[15:0];
        return 3;
      end
      default: begin
        case (op)
          4'h1: begin r = 32'(x) + 32'(y); c = r[16]; end
          4'h2: begin r = 32'(x) - 32'(y); c = (x < y); end
          4'h3: begin r = 32'(x) * 32'(y); c = (r[31:16] != 0); end
          4'h4: r = 32'(x & y);
          4'h5: r = 32'(x | y);
          4'h6: r = 32'(x ^ y);
          4'h7: r = 32'(~x);
          4'h8: begin r = 32'(x) << 1; c = x[15]; end
          4'h9: begin r = 32'(x) >> 1; c = x[0]; end
          4'ha: begin r = 32'(x) + 1; c = (x == 16'hffff); end
          default: begin r = 32'(x) - 1; c = (x == 16'h0000); end
        endcase
        m_reg[rz] = r[15:0];
        m_c = c;
        m_z = (r[15:0] == 16'h0);
        m_p = ($countones(r[15:0]) % 2 == 0);
        seen_c += int'(m_c); seen_z += int'(m_z); seen_p += int'(m_p);
      end
    endcase
    m_pc = m_pc + 16'd1;
    return cycles;
  endfunction

  task automatic load_and_reset();
    rst = 1'b1;
    im_ld_we = 1'b1;
    for (int a = 0; a < PLEN; a++) begin
      im_ld_addr = 16'(a); im_ld_data = prog[a];
      @(posedge clk); #1;
    end
    im_ld_we = 1'b0;
    dm_ld_we = 1'b1;
    for (int a = 0; a < DWORDS; a++) begin
      dm_ld_addr = 16'(a); dm_ld_wdata = m_dm[a];
      @(posedge clk); #1;
    end
    dm_ld_we = 1'b0;
    foreach (m_reg[i]) m_reg[i] = '0;
    {m_c, m_z, m_p, m_halt} = '0;
    m_pc = '0;
    @(posedge clk); #1;
    chk(state == S0 && pc == 16'h0 && !halted, "reset state");
    rst = 1'b0;
  endtask

  task automatic compare_state(input string what);
    for (int r = 0; r < 16; r++)
      chk(dut.u_rf.regs[r] == m_reg[r], $sformatf("%s: R%0d=%h expected %h", what, r,
          dut.u_rf.regs[r], m_reg[r]));
    chk({carry_flag, zero_flag, parity_flag} == {m_c, m_z, m_p},
        $sformatf("%s: flags CZP=%b%b%b expected %b%b%b", what, carry_flag, zero_flag,
                  parity_flag, m_c, m_z, m_p));
    chk(pc == m_pc, $sformatf("%s: pc=%h expected %h", what, pc, m_pc));
  endtask

  // run the loaded program in lockstep with the model
  task automatic run_program(input int pnum);
    int n = 0;
    // wait for the first decode
    while (state != S1) begin @(posedge clk); #1; end
    while (n < MAXINSTR) begin
      logic [23:0] w;
      int exp_cycles, cycles;
      w = prog[m_pc[6:0]];
      chk(instruction == w, $sformatf("decoded word %h expected %h", instruction, w));
      seen_op[w[23:20]]++;
      exp_cycles = model_step(w);
      if (m_halt) begin
        repeat (8) begin @(posedge clk); #1; end
        chk(halted && state == S9, "core halted");
        seen_halt++;
        compare_state("after HLT");
        break;
      end
      // count cycles from this S1 to the next S1
      cycles = 0;
      do begin @(posedge clk); #1; cycles++; end while (state != S1);
      chk(cycles == exp_cycles, $sformatf("op %h took %0d cycles, expected %0d",
          w[23:20], cycles, exp_cycles));
      compare_state($sformatf("prog %0d instr %0d", pnum, n));
      if (pnum == 0 && n == 4) begin
        chk(m_reg[3] == 16'h0008 && m_reg[4] == 16'h0002 && m_reg[5] == 16'h000f,
            "traced example results");
        chk(parity_flag && !carry_flag && !zero_flag, "traced example flags after MUL");
      end
      n++;
    end
    for (int a = 0; a < DWORDS; a++) begin
      dm_ld_addr = 16'(a); #1;
      chk(dm_ld_rdata == m_dm[a], $sformatf("DM[%0d]=%h expected %h", a, dm_ld_rdata, m_dm[a]));
    end
  endtask

  initial begin
    rst = 1'b1; im_ld_we = 0; dm_ld_we = 0; im_ld_addr = '0; im_ld_data = '0;
    dm_ld_addr = '0; dm_ld_wdata = '0;
    foreach (seen_op[i]) seen_op[i] = 0;
    repeat (2) @(posedge clk);
    for (int p = 0; p < NPROG; p++) begin
      for (int a = 0; a < DWORDS; a++) m_dm[a] = (p == 0 && a == 4) ? 16'h0003 : 16'($urandom);
      for (int a = 0; a < PLEN; a++) prog[a] = rand_instr(a, p != 0);
      if (p == 0) begin
        prog[0] = enc(12, 1, 'h0005);   // MVI  R1, 0005
        prog[1] = enc(13, 2, 'h0004);   // LOAD R2, 0004
        prog[2] = enc3(1, 3, 1, 2);       // ADD  R3, R1, R2
        prog[3] = enc3(2, 4, 1, 2);       // SUB  R4, R1, R2
        prog[4] = enc3(3, 5, 1, 2);       // MUL  R5, R1, R2
        prog[5] = enc3(2, 6, 1, 1);       // SUB  R6, R1, R1  (zero)
        prog[6] = enc(12, 7, 'hffff);   // MVI  R7, ffff
        prog[7] = enc3(10, 8, 7, 0);      // INC  R8, R7      (carry)
      end
      if (p == 0 || p % 3 == 1) prog[PLEN - 1] = enc(0, 0, 0);  // HLT
      else prog[PLEN - 1] = enc(15, 0, 16'(-$urandom_range(1, PLEN - 1)));  // JUMP back
      load_and_reset();
      run_program(p);
    end
    for (int op = 0; op < 16; op++)
      chk(seen_op[op] > 0, $sformatf("opcode %h never executed", op));
    chk(seen_fwd > 0,  "no forward jump");
    chk(seen_back > 0, "no backward jump");
    chk(seen_halt > 0, "never halted");
    chk(seen_c > 0 && seen_z > 0 && seen_p > 0, "a flag was never set");
    $display("executed per opcode: %p; jumps fwd %0d back %0d; halts %0d; C %0d Z %0d P %0d",
             seen_op, seen_fwd, seen_back, seen_halt, seen_c, seen_z, seen_p);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
