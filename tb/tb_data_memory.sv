// tb_data_memory: self-checking test of the data memory: random mixes of
// writes, reads and idle (en low) cycles against a shadow array; checks the
// one-cycle read latency and that the read register holds while disabled or
// writing.
module tb_data_memory;
  int checks = 0, failures = 0;
  logic clk = 0, en, we;
  logic [31:0] addr, wdata, rdata, exp_r;
  logic [31:0] shadow [32];

  data_memory #(.DEPTH(32)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    en = 1; we = 1;
    for (int i = 0; i < 32; i++) begin
      shadow[i] = $urandom; addr = 32'(i * 4); wdata = shadow[i];
      @(posedge clk); #1;
    end
    we = 0; addr = 0; @(posedge clk); #1;
    exp_r = shadow[0];
    check(rdata, exp_r, "first read");
    for (int n = 0; n < 1000; n++) begin
      int k, mode;
      k = $urandom % 32; mode = $urandom % 3;
      addr = 32'(k * 4) + 32'($urandom % 4);
      wdata = $urandom;
      en = mode != 0;
      we = mode == 2;
      @(posedge clk); #1;
      if (mode == 1) exp_r = shadow[k];
      if (mode == 2) shadow[k] = wdata;
      check(rdata, exp_r, $sformatf("mode %0d word %0d", mode, k));
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
