// tb_io_port: self-checking test of the I/O port unit: OUT writes land in the
// addressed output register with a one-cycle strobe, IN captures the addressed
// input, idle cycles change nothing, reset clears the outputs.
module tb_io_port;
  int checks = 0, failures = 0;
  logic clk = 0, rst, we, re, out_strobe;
  logic [31:0] addr, wdata, rdata, exp_r;
  logic [3:0][31:0] port_in, port_out, exp_out;
  logic [1:0] out_sel;

  io_port #(.WIDTH(32), .NUM_PORTS(4)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    rst = 1; we = 0; re = 0; addr = 0; wdata = 0; port_in = '0;
    @(posedge clk); #1;
    rst = 0;
    exp_out = '0; exp_r = 0;
    check(32'(port_out[2]), 0, "reset");
    for (int n = 0; n < 1000; n++) begin
      int p, mode;
      p = $urandom % 4; mode = $urandom % 3;
      addr = $urandom;
      addr[1:0] = 2'(p);
      wdata = $urandom;
      for (int i = 0; i < 4; i++) port_in[i] = $urandom;
      we = mode == 1; re = mode == 2;
      @(posedge clk); #1;
      if (mode == 1) exp_out[p] = wdata;
      if (mode == 2) exp_r = port_in[p];
      for (int i = 0; i < 4; i++) check(port_out[i], exp_out[i], $sformatf("port_out %0d", i));
      check(rdata, exp_r, "rdata");
      check(32'(out_strobe), 32'(mode == 1), "strobe");
      if (mode == 1) check(32'(out_sel), 32'(p), "out_sel");
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
