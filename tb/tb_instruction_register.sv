// tb_instruction_register: self-checking test of the instruction register and
// its field decoder.
//
// Feeds random 24-bit words (plus the example encodings MVI R1,0005,
// LOAD R2,0004 and ADD R3,R1,R2) and checks, one cycle later, the held word
// and every decoded field against values sliced independently from the word
// according to the instruction format, including the zero fields an opcode
// does not use.
module tb_instruction_register;
  import risc16_pkg::*;

  logic    clk;
  logic    rst;
  instr_t  instr_in, ir;
  opcode_e opcode;
  ridx_t   rz, rx, ry;
  word_t   immediate, address;
  int checks = 0, failures = 0;

  instruction_register dut (.*);

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s word=%h", what, ir); end
  endtask

  task automatic apply(input logic [23:0] w);
    logic [3:0] op;
    instr_in = w;
    @(posedge clk); #1;
    op = w[23:20];
    chk(ir == w, "held word");
    chk(4'(opcode) == op, "opcode");
    chk(rz == w[19:16], "Rz");
    chk(immediate == ((op == 4'hc) ? w[15:0] : 16'h0), "immediate");
    chk(address == ((op == 4'hd || op == 4'he || op == 4'hf) ? w[15:0] : 16'h0), "address");
    if (op >= 4'h1 && op <= 4'hb) begin
      chk(rx == w[15:12], "Rx");
      chk(ry == w[11:8], "Ry");
    end else if (op == 4'he) begin
      chk(rx == w[19:16], "STORE source on Rx");
      chk(ry == 4'h0, "Ry unused");
    end else begin
      chk(rx == 4'h0 && ry == 4'h0, "Rx/Ry unused");
    end
  endtask

  initial begin
    rst = 1'b1; instr_in = 24'hffffff;
    @(posedge clk); #1;
    chk(ir == 24'h0 && opcode == OP_HLT, "reset clears to HLT");
    rst = 1'b0;
    apply(24'hc10005);
    chk(rz == 4'h1 && immediate == 16'h0005, "MVI R1 0005");
    apply(24'hd20004);
    chk(rz == 4'h2 && address == 16'h0004, "LOAD R2 0004");
    apply(24'h131200);
    chk(rz == 4'h3 && rx == 4'h1 && ry == 4'h2, "ADD R3 R1 R2");
    for (int i = 0; i < 2000; i++) apply(24'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
