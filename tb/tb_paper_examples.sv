// tb_paper_examples: runs the processor's worked instruction examples on the
// full processor at its default sizes:
//   ADD R1,R2,R3   SRL R1,R2,R3   ADDI R1,R2,6   SUBI R1,R2,6
//   SW R1,R2,8     LW R1,R2,8
// with R2 = 20 and R3 = 2 set up first. Every write to R1 in write-back is
// recorded with the clock edge it happens on and compared with values and
// edges worked out by hand: 22, 5, 26, 14, 22, and instruction k (counting
// from the first word) writing at rising edge k + 5, one instruction per clock.
module tb_paper_examples;
  import risc_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst;
  logic prog_we;
  logic [31:0] prog_addr, prog_data, pc;
  logic [3:0][31:0] io_in, io_out;
  logic io_out_strobe;
  logic [1:0] io_out_sel;

  risc_cpu dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic logic [31:0] R(funct_e fn, int rd, int rs, int rt);
    return {OP_RTYPE, 5'(rs), 5'(rt), 5'(rd), 5'd0, fn};
  endfunction
  function automatic logic [31:0] I(opcode_e op, int rt, int rs, int imm);
    return {op, 5'(rs), 5'(rt), 16'(imm)};
  endfunction

  localparam int N = 16;
  logic [31:0] prog [N];
  int          edges = 0;
  logic [31:0] r1_vals [$];
  int          r1_edges [$];

  always @(posedge clk) if (!rst) begin
    edges++;
    if (dut.wb_we && dut.wb_reg == 5'd1) begin
      r1_vals.push_back(dut.wb_data);
      r1_edges.push_back(edges);
    end
  end

  initial begin
    for (int i = 0; i < N; i++) prog[i] = NOP;
    prog[0]  = I(OP_ADDI, 2, 0, 20);     // R2 = 20
    prog[1]  = I(OP_ADDI, 3, 0, 2);      // R3 = 2
    prog[4]  = R(FN_ADD,  1, 2, 3);      // ADD  R1,R2,R3  -> 22
    prog[7]  = I(OP_SW,   1, 2, 8);      // SW   R1,R2,8   -> mem[28] = 22
    prog[8]  = R(FN_SRL,  1, 2, 3);      // SRL  R1,R2,R3  -> 5
    prog[9]  = I(OP_ADDI, 1, 2, 6);      // ADDI R1,R2,6   -> 26
    prog[10] = I(OP_SUBI, 1, 2, 6);      // SUBI R1,R2,6   -> 14
    prog[11] = I(OP_LW,   1, 2, 8);      // LW   R1,R2,8   -> 22
    prog[12] = {OP_J, 26'd12};           // halt
    rst = 1; prog_we = 0; prog_addr = 0; prog_data = 0; io_in = '0;
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      prog_we = 1; prog_addr = 32'(i * 4); prog_data = prog[i];
    end
    @(negedge clk); prog_we = 0;
    @(negedge clk); rst = 0;
    repeat (40) @(posedge clk);
    #1;
    begin
      logic [31:0] exp_v [5] = '{32'd22, 32'd5, 32'd26, 32'd14, 32'd22};
      int          exp_e [5] = '{4 + 5, 8 + 5, 9 + 5, 10 + 5, 11 + 5};
      check(32'(r1_vals.size()), 5, "number of writes to R1");
      for (int k = 0; k < 5 && k < r1_vals.size(); k++) begin
        check(r1_vals[k], exp_v[k], $sformatf("R1 value %0d", k));
        check(32'(r1_edges[k]), 32'(exp_e[k]), $sformatf("R1 write edge %0d", k));
      end
    end
    check(dut.u_dmem.mem[7], 22, "SW stored R1 at R2 + 8");
    check(dut.u_rf.regs[2], 20, "R2 kept");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
