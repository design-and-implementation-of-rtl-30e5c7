// risc_pkg: instruction encodings, ALU operation codes and the pipeline
// register layouts shared by the 32-bit five-stage RISC processor.
//
// Instruction formats (bit fields follow the processor's four formats):
//   R  : opcode[31:26] rs[25:21] rt[20:16] rd[15:11] shamt[10:6] funct[5:0]
//   I  : opcode[31:26] rs[25:21] rt[20:16] imm[15:0]
//   J  : opcode[31:26] target[25:0]
//   I/O: opcode[31:26] rs[25:21] rd[20:16] imm[15:0]
// The field layout is the processor's own. The numeric opcode and function
// codes are this design's choice: they follow MIPS where MIPS has the same
// instruction (ADD, SUB, LW, SW, J, ...), and are picked freely for the
// instructions MIPS lacks (SUBI, IN, OUT).
package risc_pkg;

  localparam int unsigned XLEN = 32;

  // ---------------------------------------------------------------- opcodes
  typedef enum logic [5:0] {
    OP_RTYPE = 6'h00,
    OP_J     = 6'h02,
    OP_BEQZ  = 6'h04,   // branch if R[rs] == 0
    OP_BNEZ  = 6'h05,   // branch if R[rs] != 0
    OP_ADDI  = 6'h08,
    OP_SUBI  = 6'h09,
    OP_ANDI  = 6'h0C,
    OP_ORI   = 6'h0D,
    OP_LW    = 6'h23,
    OP_SW    = 6'h2B,
    OP_IN    = 6'h30,   // R[rd] <= port[R[rs] + imm]
    OP_OUT   = 6'h38    // port[R[rs] + imm] <= R[rd]
  } opcode_e;

  // ------------------------------------------------- R-type function codes
  // SLL/SRL/SRA shift by the value of register rt (the "SRL R1,R2,R3" form);
  // SLLI/SRLI/SRAI shift by the shamt field.
  typedef enum logic [5:0] {
    FN_SLLI = 6'h00,
    FN_SRLI = 6'h02,
    FN_SRAI = 6'h03,
    FN_SLL  = 6'h04,
    FN_SRL  = 6'h06,
    FN_SRA  = 6'h07,
    FN_ADD  = 6'h20,
    FN_SUB  = 6'h22,
    FN_AND  = 6'h24,
    FN_OR   = 6'h25,
    FN_XOR  = 6'h26,
    FN_NOR  = 6'h27,
    FN_SLT  = 6'h2A
  } funct_e;

  // ---------------------------------------------------- ALU select (4 bits)
  // 0 = add and 1 = subtract; the other codes are this design's choice.
  typedef enum logic [3:0] {
    ALU_ADD = 4'd0,
    ALU_SUB = 4'd1,
    ALU_AND = 4'd2,
    ALU_OR  = 4'd3,
    ALU_XOR = 4'd4,
    ALU_NOR = 4'd5,
    ALU_SLL = 4'd6,
    ALU_SRL = 4'd7,
    ALU_SRA = 4'd8,
    ALU_SLT = 4'd9
  } alu_op_e;

  // Second ALU operand
  typedef enum logic [1:0] {
    BSEL_REG   = 2'd0,   // R[rt]
    BSEL_IMM   = 2'd1,   // sign-extended immediate
    BSEL_SHAMT = 2'd2    // zero-extended shamt field
  } bsel_e;

  // Write-back source
  typedef enum logic [1:0] {
    WB_ALU = 2'd0,
    WB_MEM = 2'd1,
    WB_IO  = 2'd2
  } wbsel_e;

  // Control word produced in ID. All-zero is a bubble: nothing is written.
  typedef struct packed {
    logic    reg_write;   // write R[wreg] in WB
    logic    mem_read;    // LW
    logic    mem_write;   // SW
    logic    io_read;     // IN
    logic    io_write;    // OUT
    logic    branch_z;    // BEQZ
    logic    branch_nz;   // BNEZ
    logic    jump;        // J
    logic    dst_rd;      // destination is rd[15:11] (R-type), else [20:16]
    bsel_e   b_sel;
    alu_op_e alu_op;
    wbsel_e  wb_sel;
  } ctrl_t;

  localparam logic [XLEN-1:0] NOP = '0;   // SLLI r0, r0, 0

  // ------------------------------------------------- pipeline registers
  typedef struct packed {
    logic [XLEN-1:0] npc;      // address of the instruction + 4
  } if_id_t;

  typedef struct packed {
    ctrl_t           ctrl;
    logic [XLEN-1:0] a;        // R[rs]
    logic [XLEN-1:0] b;        // R[rt] (also store / OUT data)
    logic [XLEN-1:0] imm;      // sign-extended immediate
    logic [4:0]      shamt;
    logic [4:0]      wreg;     // destination register number
  } id_ex_t;

  typedef struct packed {
    ctrl_t           ctrl;
    logic [XLEN-1:0] alu_y;    // ALU result / memory or port address
    logic [XLEN-1:0] sdata;    // store / OUT data
    logic [4:0]      wreg;
  } ex_mem_t;

  typedef struct packed {
    ctrl_t           ctrl;
    logic [XLEN-1:0] alu_y;
    logic [4:0]      wreg;
  } mem_wb_t;

endpackage
