// tb_instruction_memory: self-checking test of the instruction memory: loads
// words through the program port, then reads them back, checking the one-cycle
// synchronous read latency, that en low holds the output, and that reset
// clears the output register to NOP.
module tb_instruction_memory;
  int checks = 0, failures = 0;
  logic clk = 0, rst, en, prog_we;
  logic [31:0] addr, instr, prog_addr, prog_data;
  logic [31:0] shadow [64];

  instruction_memory #(.DEPTH(64)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    rst = 1; en = 0; prog_we = 0; addr = 0; prog_addr = 0; prog_data = 0;
    @(posedge clk); #1;
    check(instr, 0, "reset gives NOP");
    for (int i = 0; i < 64; i++) begin
      shadow[i] = $urandom;
      prog_we = 1; prog_addr = 32'(i * 4); prog_data = shadow[i];
      @(posedge clk); #1;
    end
    prog_we = 0; rst = 0; en = 1;
    for (int n = 0; n < 300; n++) begin
      int k;
      k = $urandom % 64;
      addr = 32'(k * 4) | 32'($urandom % 4);
      en = (n % 7) != 3;
      begin
        logic [31:0] prev_instr;
        prev_instr = instr;
        @(posedge clk); #1;
        check(instr, en ? shadow[k] : prev_instr, "read");
      end
    end
    rst = 1; @(posedge clk); #1;
    check(instr, 0, "reset clears output");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
