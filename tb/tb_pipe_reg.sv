// tb_pipe_reg: self-checking test of the pipeline register with a packed
// struct payload: loads on enable, holds when disabled, clears to the all-zero
// bubble on reset or clear.
module tb_pipe_reg;
  import risc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst, en, clear;
  ex_mem_t d, q, exp_q;

  pipe_reg #(.T(ex_mem_t)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    rst = 1; en = 0; clear = 0; d = '0;
    @(posedge clk); #1;
    rst = 0; exp_q = '0;
    for (int n = 0; n < 1000; n++) begin
      d = ex_mem_t'({$urandom, $urandom, $urandom});
      en = ($urandom % 4) != 0;
      clear = ($urandom % 10) == 0;
      rst = ($urandom % 50) == 0;
      @(posedge clk); #1;
      if (rst || clear) exp_q = '0;
      else if (en) exp_q = d;
      checks++;
      if (q !== exp_q) begin
        failures++;
        $display("FAIL cycle %0d: got %h expected %h", n, q, exp_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
