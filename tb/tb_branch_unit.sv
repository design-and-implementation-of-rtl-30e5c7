// tb_branch_unit: self-checking test of the ID-stage branch unit: zero test,
// BEQZ/BNEZ taken and not taken, PC-relative target (byte offset, negative
// offsets included) and the J target built from the upper bits of npc.
module tb_branch_unit;
  int checks = 0, failures = 0;
  logic branch_z, branch_nz, jump, zero, redirect;
  logic [31:0] rs_val, npc, imm, target;
  logic [25:0] target26;

  branch_unit #(.WIDTH(32)) dut (.*);

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    for (int n = 0; n < 2000; n++) begin
      int kind;
      logic exp_taken;
      kind = $urandom % 4;   // 0 none, 1 beqz, 2 bnez, 3 j
      branch_z = kind == 1; branch_nz = kind == 2; jump = kind == 3;
      rs_val = (($urandom % 2) == 1) ? 32'h0 : $urandom;
      npc = $urandom & 32'hFFFF_FFFC;
      imm = {{16{1'b0}}, 16'($urandom)};
      if (imm[15]) imm[31:16] = 16'hFFFF;
      target26 = 26'($urandom);
      #1;
      exp_taken = (kind == 3) || (kind == 1 && rs_val == 0) || (kind == 2 && rs_val != 0);
      check(32'(zero), 32'(rs_val == 0), "zero");
      check(32'(redirect), 32'(exp_taken), "redirect");
      if (kind == 3) check(target, {npc[31:28], 28'(target26) * 28'd4}, "jump target");
      else           check(target, 32'(longint'(npc) + longint'($signed(imm))), "branch target");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
