// tb_data_memory: self-checking test of the data memory.
//
// Uses a reduced depth (256 words) and a reference array. Mixes host writes,
// core writes (mem_wr) and core reads (mem_rd) at random; checks that rd_data
// changes only on a mem_rd edge and then holds the addressed word, and that
// the host read port always shows the reference contents. Includes the traced
// example: word 0004H holding 0003H is read back by a LOAD-style access.
module tb_data_memory;
  import risc16_pkg::*;
  localparam int unsigned AW = 8;

  logic          clk;
  logic          rst, mem_rd, mem_wr, ld_we;
  logic [AW-1:0] addr, ld_addr;
  word_t         wr_data, rd_data, ld_wdata, ld_rdata, last_rd;
  word_t         model [2**AW];
  int checks = 0, failures = 0;

  data_memory #(.AW(AW)) dut (.*);

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    rst = 1'b1; mem_rd = 0; mem_wr = 0; ld_we = 0; addr = '0; ld_addr = '0;
    wr_data = '0; ld_wdata = '0;
    @(posedge clk); #1;
    chk(rd_data == 16'h0, "reset clears read register");
    rst = 1'b0;
    // host fills the memory
    for (int a = 0; a < 2**AW; a++) begin
      ld_we = 1'b1; ld_addr = AW'(a); ld_wdata = 16'(a * 37 + 5);
      if (a == 4) ld_wdata = 16'h0003;
      @(posedge clk); #1;
      model[a] = ld_wdata;
    end
    ld_we = 1'b0;
    // LOAD R2,0004 read phase
    addr = 8'd4; mem_rd = 1'b1;
    @(posedge clk); #1;
    mem_rd = 1'b0;
    chk(rd_data == 16'h0003, "DM[0004] = 0003");
    last_rd = rd_data;
    for (int i = 0; i < 4000; i++) begin
      automatic int kind = $urandom_range(3);
      addr = AW'($urandom); wr_data = 16'($urandom);
      ld_addr = AW'($urandom); ld_wdata = 16'($urandom);
      mem_rd = (kind == 0); mem_wr = (kind == 1); ld_we = (kind == 2);
      #1;
      chk(ld_rdata == model[ld_addr], "host read port");
      @(posedge clk); #1;
      if (mem_rd) last_rd = model[addr];
      if (mem_wr) model[addr] = wr_data;
      if (ld_we)  model[ld_addr] = ld_wdata;
      chk(rd_data == last_rd, $sformatf("rd_data=%h expected %h", rd_data, last_rd));
      mem_rd = 0; mem_wr = 0; ld_we = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
