// tb_register_file: self-checking test of the register file. Writes random
// values to random registers and compares both read ports with a shadow
// array; checks that register 0 stays zero, that the upper register-field bits
// are ignored, that a read of the register being written returns the new
// value in the same cycle, and that reset clears everything.
module tb_register_file;
  int checks = 0, failures = 0;
  logic clk = 0, rst;
  logic [4:0]  ra1, ra2, wa;
  logic [31:0] rd1, rd2, wd;
  logic        we;
  logic [31:0] shadow [8];

  register_file #(.WIDTH(32), .NUM_REGS(8)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    rst = 1; we = 0; ra1 = 0; ra2 = 0; wa = 0; wd = 0;
    foreach (shadow[i]) shadow[i] = 0;
    @(posedge clk); #1;
    rst = 0;
    for (int i = 0; i < 8; i++) begin
      ra1 = 5'(i); #1; check(rd1, 0, "after reset");
    end
    for (int n = 0; n < 1000; n++) begin
      we = ($urandom % 2) == 1;
      wa = 5'($urandom);
      wd = $urandom;
      ra1 = 5'($urandom);
      ra2 = (n % 3 == 0) ? wa : 5'($urandom);
      #1;
      // same-cycle write-before-read
      check(rd1, (ra1[2:0] == 0) ? 0 : (we && wa[2:0] == ra1[2:0]) ? wd : shadow[ra1[2:0]], "rd1");
      check(rd2, (ra2[2:0] == 0) ? 0 : (we && wa[2:0] == ra2[2:0]) ? wd : shadow[ra2[2:0]], "rd2");
      @(posedge clk);
      if (we && wa[2:0] != 0) shadow[wa[2:0]] = wd;
      #1;
    end
    we = 0;
    rst = 1; @(posedge clk); #1; rst = 0;
    ra1 = 5'd7; #1; check(rd1, 0, "reset clears");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
