// control_unit: instruction decoder of the ID stage.
//
// Splits the opcode and function fields of the instruction into the control
// word ctrl_t that travels down the pipeline with the instruction: which
// register to write and from where (ALU, data memory, input port), whether the
// instruction loads, stores, reads or writes a port, branches or jumps, the
// ALU select and the ALU's second operand (register, sign-extended immediate
// or shamt). An opcode or function code the processor does not define decodes
// to the all-zero control word, a bubble. Combinational.
//
// Instruction set: R-type ADD SUB AND OR XOR NOR SLT, SLL SRL SRA (shift by a
// register) and SLLI SRLI SRAI (shift by shamt); I-type ADDI SUBI ANDI ORI
// (immediate sign-extended), LW, SW, BEQZ, BNEZ; J-type J; I/O-type IN, OUT.
// ADD, SRL, ADDI, SUBI, LW, SW, the jump and the port instructions come from
// the processor's description; the rest of the list and all codes are this
// design's choice.
module control_unit
  import risc_pkg::*;
(
  input  logic [31:0] instr,
  output ctrl_t       ctrl
);
  logic [5:0] opcode, funct;
  assign opcode = instr[31:26];
  assign funct  = instr[5:0];

  always_comb begin
    ctrl = '0;
    unique case (opcode)
      OP_RTYPE: begin
        ctrl.reg_write = 1'b1;
        ctrl.dst_rd    = 1'b1;
        ctrl.b_sel     = BSEL_REG;
        ctrl.wb_sel    = WB_ALU;
        unique case (funct)
          FN_ADD:  ctrl.alu_op = ALU_ADD;
          FN_SUB:  ctrl.alu_op = ALU_SUB;
          FN_AND:  ctrl.alu_op = ALU_AND;
          FN_OR:   ctrl.alu_op = ALU_OR;
          FN_XOR:  ctrl.alu_op = ALU_XOR;
          FN_NOR:  ctrl.alu_op = ALU_NOR;
          FN_SLT:  ctrl.alu_op = ALU_SLT;
          FN_SLL:  ctrl.alu_op = ALU_SLL;
          FN_SRL:  ctrl.alu_op = ALU_SRL;
          FN_SRA:  ctrl.alu_op = ALU_SRA;
          FN_SLLI: begin ctrl.alu_op = ALU_SLL; ctrl.b_sel = BSEL_SHAMT; end
          FN_SRLI: begin ctrl.alu_op = ALU_SRL; ctrl.b_sel = BSEL_SHAMT; end
          FN_SRAI: begin ctrl.alu_op = ALU_SRA; ctrl.b_sel = BSEL_SHAMT; end
          default: ctrl = '0;
        endcase
      end
      OP_ADDI, OP_SUBI, OP_ANDI, OP_ORI: begin
        ctrl.reg_write = 1'b1;
        ctrl.b_sel     = BSEL_IMM;
        ctrl.wb_sel    = WB_ALU;
        unique case (opcode)
          OP_SUBI: ctrl.alu_op = ALU_SUB;
          OP_ANDI: ctrl.alu_op = ALU_AND;
          OP_ORI:  ctrl.alu_op = ALU_OR;
          default: ctrl.alu_op = ALU_ADD;
        endcase
      end
      OP_LW: begin
        ctrl.reg_write = 1'b1;
        ctrl.mem_read  = 1'b1;
        ctrl.b_sel     = BSEL_IMM;
        ctrl.alu_op    = ALU_ADD;
        ctrl.wb_sel    = WB_MEM;
      end
      OP_SW: begin
        ctrl.mem_write = 1'b1;
        ctrl.b_sel     = BSEL_IMM;
        ctrl.alu_op    = ALU_ADD;
      end
      OP_IN: begin
        ctrl.reg_write = 1'b1;
        ctrl.io_read   = 1'b1;
        ctrl.b_sel     = BSEL_IMM;
        ctrl.alu_op    = ALU_ADD;
        ctrl.wb_sel    = WB_IO;
      end
      OP_OUT: begin
        ctrl.io_write  = 1'b1;
        ctrl.b_sel     = BSEL_IMM;
        ctrl.alu_op    = ALU_ADD;
      end
      OP_BEQZ: ctrl.branch_z  = 1'b1;
      OP_BNEZ: ctrl.branch_nz = 1'b1;
      OP_J:    ctrl.jump      = 1'b1;
      default: ctrl = '0;
    endcase
  end
endmodule
