// tb_control_unit: self-checking test of the decoder. For every instruction of
// the set it checks the whole control word against a table written here, and
// checks that undefined opcodes and function codes decode to a bubble.
module tb_control_unit;
  import risc_pkg::*;
  int checks = 0, failures = 0;
  logic [31:0] instr;
  ctrl_t ctrl;

  control_unit dut (.*);

  // fields: reg_write mem_read mem_write io_read io_write bz bnz jump dst_rd b_sel alu_op wb_sel
  function automatic ctrl_t mk(input logic rw, mr, mw, ir, iw, bz, bnz, j, drd,
                               input bsel_e bs, input alu_op_e op, input wbsel_e wb);
    ctrl_t c;
    c.reg_write = rw; c.mem_read = mr; c.mem_write = mw; c.io_read = ir; c.io_write = iw;
    c.branch_z = bz; c.branch_nz = bnz; c.jump = j; c.dst_rd = drd;
    c.b_sel = bs; c.alu_op = op; c.wb_sel = wb;
    return c;
  endfunction

  task automatic expect_ctrl(input logic [5:0] op, input logic [5:0] fn, input ctrl_t exp, input string what);
    instr = {op, 20'($urandom), fn};
    #1;
    checks++;
    if (ctrl !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, ctrl, exp);
    end
  endtask

  localparam ctrl_t BUBBLE = '0;

  initial begin
    repeat (20) begin
      expect_ctrl(OP_RTYPE, FN_ADD,  mk(1,0,0,0,0,0,0,0,1,BSEL_REG,ALU_ADD,WB_ALU), "ADD");
      expect_ctrl(OP_RTYPE, FN_SUB,  mk(1,0,0,0,0,0,0,0,1,BSEL_REG,ALU_SUB,WB_ALU), "SUB");
      expect_ctrl(OP_RTYPE, FN_AND,  mk(1,0,0,0,0,0,0,0,1,BSEL_REG,ALU_AND,WB_ALU), "AND");
      expect_ctrl(OP_RTYPE, FN_OR,   mk(1,0,0,0,0,0,0,0,1,BSEL_REG,ALU_OR,WB_ALU), "OR");
      expect_ctrl(OP_RTYPE, FN_XOR,  mk(1,0,0,0,0,0,0,0,1,BSEL_REG,ALU_XOR,WB_ALU), "XOR");
      expect_ctrl(OP_RTYPE, FN_NOR,  mk(1,0,0,0,0,0,0,0,1,BSEL_REG,ALU_NOR,WB_ALU), "NOR");
      expect_ctrl(OP_RTYPE, FN_SLT,  mk(1,0,0,0,0,0,0,0,1,BSEL_REG,ALU_SLT,WB_ALU), "SLT");
      expect_ctrl(OP_RTYPE, FN_SLL,  mk(1,0,0,0,0,0,0,0,1,BSEL_REG,ALU_SLL,WB_ALU), "SLL");
      expect_ctrl(OP_RTYPE, FN_SRL,  mk(1,0,0,0,0,0,0,0,1,BSEL_REG,ALU_SRL,WB_ALU), "SRL");
      expect_ctrl(OP_RTYPE, FN_SRA,  mk(1,0,0,0,0,0,0,0,1,BSEL_REG,ALU_SRA,WB_ALU), "SRA");
      expect_ctrl(OP_RTYPE, FN_SLLI, mk(1,0,0,0,0,0,0,0,1,BSEL_SHAMT,ALU_SLL,WB_ALU), "SLLI");
      expect_ctrl(OP_RTYPE, FN_SRLI, mk(1,0,0,0,0,0,0,0,1,BSEL_SHAMT,ALU_SRL,WB_ALU), "SRLI");
      expect_ctrl(OP_RTYPE, FN_SRAI, mk(1,0,0,0,0,0,0,0,1,BSEL_SHAMT,ALU_SRA,WB_ALU), "SRAI");
      expect_ctrl(OP_RTYPE, 6'h3F,   BUBBLE, "bad funct");
      expect_ctrl(OP_ADDI, 6'($urandom), mk(1,0,0,0,0,0,0,0,0,BSEL_IMM,ALU_ADD,WB_ALU), "ADDI");
      expect_ctrl(OP_SUBI, 6'($urandom), mk(1,0,0,0,0,0,0,0,0,BSEL_IMM,ALU_SUB,WB_ALU), "SUBI");
      expect_ctrl(OP_ANDI, 6'($urandom), mk(1,0,0,0,0,0,0,0,0,BSEL_IMM,ALU_AND,WB_ALU), "ANDI");
      expect_ctrl(OP_ORI,  6'($urandom), mk(1,0,0,0,0,0,0,0,0,BSEL_IMM,ALU_OR,WB_ALU), "ORI");
      expect_ctrl(OP_LW,   6'($urandom), mk(1,1,0,0,0,0,0,0,0,BSEL_IMM,ALU_ADD,WB_MEM), "LW");
      expect_ctrl(OP_SW,   6'($urandom), mk(0,0,1,0,0,0,0,0,0,BSEL_IMM,ALU_ADD,WB_ALU), "SW");
      expect_ctrl(OP_IN,   6'($urandom), mk(1,0,0,1,0,0,0,0,0,BSEL_IMM,ALU_ADD,WB_IO), "IN");
      expect_ctrl(OP_OUT,  6'($urandom), mk(0,0,0,0,1,0,0,0,0,BSEL_IMM,ALU_ADD,WB_ALU), "OUT");
      expect_ctrl(OP_BEQZ, 6'($urandom), mk(0,0,0,0,0,1,0,0,0,BSEL_REG,ALU_ADD,WB_ALU), "BEQZ");
      expect_ctrl(OP_BNEZ, 6'($urandom), mk(0,0,0,0,0,0,1,0,0,BSEL_REG,ALU_ADD,WB_ALU), "BNEZ");
      expect_ctrl(OP_J,    6'($urandom), mk(0,0,0,0,0,0,0,1,0,BSEL_REG,ALU_ADD,WB_ALU), "J");
      expect_ctrl(6'h3F,   6'($urandom), BUBBLE, "bad opcode");
      expect_ctrl(6'h01,   6'($urandom), BUBBLE, "bad opcode 1");
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
