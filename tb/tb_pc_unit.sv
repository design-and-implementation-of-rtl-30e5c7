// tb_pc_unit: self-checking test of the program counter: reset value,
// increment by 4 each cycle, and a redirect loading the target at the next
// edge.
module tb_pc_unit;
  int checks = 0, failures = 0;
  logic clk = 0, rst, redirect;
  logic [31:0] target, pc, pc_plus4, exp_pc;

  pc_unit #(.WIDTH(32), .RESET_PC(32'h0)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    rst = 1; redirect = 0; target = 0;
    @(posedge clk); #1;
    check(pc, 0, "reset");
    rst = 0;
    exp_pc = 0;
    for (int n = 0; n < 500; n++) begin
      redirect = ($urandom % 5) == 0;
      target = $urandom & 32'hFFFF_FFFC;
      #1;
      check(pc_plus4, exp_pc + 4, "pc+4");
      @(posedge clk); #1;
      exp_pc = redirect ? target : exp_pc + 4;
      check(pc, exp_pc, "next pc");
    end
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
