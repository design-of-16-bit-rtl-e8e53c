// tb_alu: self-checking test of the ALU and its flag register.
//
// For every opcode and random operands (plus corner values 0000, 0001, 7fff,
// 8000, ffff) the result is compared with a reference computed in the
// testbench with 32-bit integer arithmetic. The flag register is loaded and
// {C,Z,P} are compared with the expected carry/borrow, zero test and even
// parity. The example of the processor's trace is included: ADD 5,3 = 0008,
// SUB = 0002, MUL = 000f with parity set. A cycle with flag_en low must leave
// the flags unchanged.
module tb_alu;
  import risc16_pkg::*;

  logic    clk;
  logic    rst, flag_en;
  opcode_e opcode;
  word_t   a, b, result;
  logic    carry_flag, zero_flag, parity_flag;
  int checks = 0, failures = 0;

  alu dut (.*);

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference: returns {carry, result}
  function automatic logic [16:0] model(int op, int x, int y);
    int r;
    logic c;
    c = 1'b0;
    case (op)
      1:  begin r = x + y;      c = (r > 65535); end
      2:  begin r = x - y;      c = (x < y); end
      3:  begin longint p = longint'(x) * longint'(y); r = int'(p & 65535); c = (p > 65535); end
      4:  r = x & y;
      5:  r = x | y;
      6:  r = x ^ y;
      7:  r = 65535 - x;
      8:  begin r = x * 2; c = (x >= 32768); end
      9:  begin r = x / 2; c = (x % 2 == 1); end
      10: begin r = x + 1; c = (x == 65535); end
      11: begin r = x - 1; c = (x == 0); end
      default: r = 0;
    endcase
    return {c, 16'(r)};
  endfunction

  function automatic logic even_ones(logic [15:0] v);
    int n = 0;
    for (int i = 0; i < 16; i++) n += int'(v[i]);
    return (n % 2 == 0);
  endfunction

  task automatic try(input int op, input logic [15:0] x, input logic [15:0] y);
    logic [16:0] m;
    logic c0, z0, p0;
    opcode = opcode_e'(op); a = x; b = y; flag_en = 1'b1;
    m = model(op, int'(x), int'(y));
    #1;
    checks++;
    if (result !== m[15:0]) begin
      failures++;
      $display("FAIL op=%0d a=%h b=%h result=%h expected %h", op, x, y, result, m[15:0]);
    end
    @(posedge clk); #1;
    checks++;
    if (op >= 1 && op <= 11 &&
        {carry_flag, zero_flag, parity_flag} !== {m[16], m[15:0] == 16'h0, even_ones(m[15:0])}) begin
      failures++;
      $display("FAIL flags op=%0d a=%h b=%h CZP=%b%b%b", op, x, y, carry_flag, zero_flag, parity_flag);
    end
    // hold: flag_en low with different operands keeps the flags
    {c0, z0, p0} = {carry_flag, zero_flag, parity_flag};
    flag_en = 1'b0; a = ~x; b = ~y;
    @(posedge clk); #1;
    checks++;
    if ({carry_flag, zero_flag, parity_flag} !== {c0, z0, p0}) begin
      failures++;
      $display("FAIL flags changed with flag_en low");
    end
  endtask

  localparam logic [15:0] CORNER [5] = '{16'h0000, 16'h0001, 16'h7fff, 16'h8000, 16'hffff};

  initial begin
    rst = 1'b1; flag_en = 1'b0; opcode = OP_HLT; a = '0; b = '0;
    @(posedge clk); #1;
    checks++;
    if ({carry_flag, zero_flag, parity_flag} !== 3'b000) begin
      failures++; $display("FAIL reset flags");
    end
    rst = 1'b0;
    // the traced example
    try(1, 16'h0005, 16'h0003);
    checks++; if (parity_flag || carry_flag || zero_flag) begin failures++; $display("FAIL ADD example flags"); end
    try(2, 16'h0005, 16'h0003);
    try(3, 16'h0005, 16'h0003);
    checks++; if (!parity_flag || carry_flag || zero_flag) begin failures++; $display("FAIL MUL example flags"); end
    for (int op = 0; op < 16; op++) begin
      foreach (CORNER[i]) foreach (CORNER[j]) try(op, CORNER[i], CORNER[j]);
      for (int k = 0; k < 300; k++) try(op, 16'($urandom), 16'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
