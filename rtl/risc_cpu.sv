// risc_cpu: 32-bit five-stage pipelined RISC processor (MIPS-style).
//
// Stages and what each holds:
//   IF  - pc_unit (PC, +4 adder, next-PC mux) and instruction_memory. The
//         memory's synchronous output register is IF/ID.IR; the pipe_reg
//         if_id holds the matching PC + 4.
//   ID  - control_unit decodes IR; register_file is read at rs and rt;
//         sign_extend widens imm16; branch_unit tests R[rs] for zero and forms
//         the branch/jump target, redirecting the PC at the end of ID.
//         Result: ID/EX register.
//   EX  - ALU with operand B chosen among R[rt], the immediate and shamt.
//         Result: EX/MEM register.
//   MEM - data_memory (LW/SW, enabled only for them) and io_port (IN/OUT),
//         both addressed by the ALU result. Their output registers, with the
//         pipe_reg mem_wb, form MEM/WB.
//   WB  - a mux picks the ALU result, load data or port data and writes it to
//         the register file.
//
// One instruction enters per clock, so a straight run of N instructions
// retires in N + 4 cycles. The pipeline has no hazard detection and no
// forwarding, as in the block diagram it follows: software schedules around
// hazards.
//   * A result written in WB is read by an instruction in ID in the same cycle
//     (register file write-before-read), so a consumer must be at least three
//     instructions after its producer (two independent instructions or NOPs
//     between). This applies to loads, IN, and to the register tested by a
//     branch, which is read in ID.
//   * Branches and J resolve in ID; the one instruction after them (delay
//     slot) always executes.
// The stage split, the branch in ID, the zero test, the sign extension and the
// eight registers follow the processor's description; instruction codes,
// memory depths, the port unit and the program-load port are this design's.
//
// Program loading: hold rst high and write words through prog_we/prog_addr/
// prog_data (byte address); release rst to start at address 0.
module risc_cpu
  import risc_pkg::*;
#(
  parameter int unsigned IMEM_DEPTH = 256,
  parameter int unsigned DMEM_DEPTH = 256,
  parameter int unsigned NUM_REGS   = 8,
  parameter int unsigned NUM_PORTS  = 4
) (
  input  logic                           clk,
  input  logic                           rst,
  // program load
  input  logic                           prog_we,
  input  logic [31:0]                    prog_addr,
  input  logic [31:0]                    prog_data,
  // ports of the I/O-type instructions
  input  logic [NUM_PORTS-1:0][XLEN-1:0] io_in,
  output logic [NUM_PORTS-1:0][XLEN-1:0] io_out,
  output logic                           io_out_strobe,
  output logic [$clog2(NUM_PORTS)-1:0]   io_out_sel,
  // observation
  output logic [XLEN-1:0]                pc
);
  // ======================================================== IF
  logic [XLEN-1:0] pc_plus4, br_target;
  logic            br_redirect;
  logic [31:0]     ir;          // IF/ID instruction register
  if_id_t          if_id_d, if_id_q;

  pc_unit #(.WIDTH(XLEN)) u_pc (
    .clk, .rst,
    .redirect (br_redirect),
    .target   (br_target),
    .pc       (pc),
    .pc_plus4 (pc_plus4)
  );

  instruction_memory #(.DEPTH(IMEM_DEPTH)) u_imem (
    .clk, .rst,
    .en        (1'b1),
    .addr      (pc),
    .instr     (ir),
    .prog_we, .prog_addr, .prog_data
  );

  assign if_id_d.npc = pc_plus4;

  pipe_reg #(.T(if_id_t)) u_if_id (
    .clk, .rst, .en(1'b1), .clear(1'b0), .d(if_id_d), .q(if_id_q)
  );

  // ======================================================== ID
  ctrl_t           id_ctrl;
  logic [XLEN-1:0] id_a, id_b, id_imm;
  logic            id_zero;
  id_ex_t          id_ex_d, id_ex_q;

  logic            wb_we;
  logic [4:0]      wb_reg;
  logic [XLEN-1:0] wb_data;

  control_unit u_ctrl (.instr(ir), .ctrl(id_ctrl));

  register_file #(.WIDTH(XLEN), .NUM_REGS(NUM_REGS)) u_rf (
    .clk, .rst,
    .ra1 (ir[25:21]),
    .ra2 (ir[20:16]),
    .rd1 (id_a),
    .rd2 (id_b),
    .we  (wb_we),
    .wa  (wb_reg),
    .wd  (wb_data)
  );

  sign_extend #(.IN_W(16), .OUT_W(XLEN)) u_sext (
    .imm_in (ir[15:0]),
    .imm_out(id_imm)
  );

  branch_unit #(.WIDTH(XLEN)) u_branch (
    .branch_z (id_ctrl.branch_z),
    .branch_nz(id_ctrl.branch_nz),
    .jump     (id_ctrl.jump),
    .rs_val   (id_a),
    .npc      (if_id_q.npc),
    .imm      (id_imm),
    .target26 (ir[25:0]),
    .zero     (id_zero),
    .redirect (br_redirect),
    .target   (br_target)
  );

  assign id_ex_d.ctrl  = id_ctrl;
  assign id_ex_d.a     = id_a;
  assign id_ex_d.b     = id_b;
  assign id_ex_d.imm   = id_imm;
  assign id_ex_d.shamt = ir[10:6];
  assign id_ex_d.wreg  = id_ctrl.dst_rd ? ir[15:11] : ir[20:16];

  pipe_reg #(.T(id_ex_t)) u_id_ex (
    .clk, .rst, .en(1'b1), .clear(1'b0), .d(id_ex_d), .q(id_ex_q)
  );

  // ======================================================== EX
  logic [XLEN-1:0] ex_b, ex_y;
  logic            ex_carry;   // not used by the instruction set
  ex_mem_t         ex_mem_d, ex_mem_q;

  always_comb begin
    unique case (id_ex_q.ctrl.b_sel)
      BSEL_IMM:   ex_b = id_ex_q.imm;
      BSEL_SHAMT: ex_b = XLEN'(id_ex_q.shamt);
      default:    ex_b = id_ex_q.b;
    endcase
  end

  alu #(.WIDTH(XLEN)) u_alu (
    .a        (id_ex_q.a),
    .b        (ex_b),
    .alu_sel  (id_ex_q.ctrl.alu_op),
    .y        (ex_y),
    .carry_out(ex_carry)
  );

  assign ex_mem_d.ctrl  = id_ex_q.ctrl;
  assign ex_mem_d.alu_y = ex_y;
  assign ex_mem_d.sdata = id_ex_q.b;
  assign ex_mem_d.wreg  = id_ex_q.wreg;

  pipe_reg #(.T(ex_mem_t)) u_ex_mem (
    .clk, .rst, .en(1'b1), .clear(1'b0), .d(ex_mem_d), .q(ex_mem_q)
  );

  // ======================================================== MEM
  logic [XLEN-1:0] mem_rdata, io_rdata;
  mem_wb_t         mem_wb_d, mem_wb_q;

  data_memory #(.DEPTH(DMEM_DEPTH)) u_dmem (
    .clk,
    .en   (ex_mem_q.ctrl.mem_read | ex_mem_q.ctrl.mem_write),
    .we   (ex_mem_q.ctrl.mem_write),
    .addr (ex_mem_q.alu_y),
    .wdata(ex_mem_q.sdata),
    .rdata(mem_rdata)
  );

  io_port #(.WIDTH(XLEN), .NUM_PORTS(NUM_PORTS)) u_io (
    .clk, .rst,
    .we        (ex_mem_q.ctrl.io_write),
    .re        (ex_mem_q.ctrl.io_read),
    .addr      (ex_mem_q.alu_y),
    .wdata     (ex_mem_q.sdata),
    .rdata     (io_rdata),
    .port_in   (io_in),
    .port_out  (io_out),
    .out_strobe(io_out_strobe),
    .out_sel   (io_out_sel)
  );

  assign mem_wb_d.ctrl  = ex_mem_q.ctrl;
  assign mem_wb_d.alu_y = ex_mem_q.alu_y;
  assign mem_wb_d.wreg  = ex_mem_q.wreg;

  pipe_reg #(.T(mem_wb_t)) u_mem_wb (
    .clk, .rst, .en(1'b1), .clear(1'b0), .d(mem_wb_d), .q(mem_wb_q)
  );

  // ======================================================== WB
  always_comb begin
    unique case (mem_wb_q.ctrl.wb_sel)
      WB_MEM:  wb_data = mem_rdata;
      WB_IO:   wb_data = io_rdata;
      default: wb_data = mem_wb_q.alu_y;
    endcase
  end

  assign wb_we  = mem_wb_q.ctrl.reg_write;
  assign wb_reg = mem_wb_q.wreg;
endmodule
