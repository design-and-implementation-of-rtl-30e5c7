// branch_unit: resolves branches and jumps in the ID stage.
//
// The "Zero?" test compares R[rs] with zero; BEQZ is taken when it is zero and
// BNEZ when it is not. The branch target adder adds the sign-extended 16-bit
// offset, as a byte offset, to the address of the instruction after the
// branch (npc). J replaces the low 28 bits of npc with target26 * 4.
// redirect tells the PC to load target at the next rising edge; the
// instruction already fetched behind the branch still executes (one delay
// slot). Combinational.
module branch_unit #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             branch_z,
  input  logic             branch_nz,
  input  logic             jump,
  input  logic [WIDTH-1:0] rs_val,
  input  logic [WIDTH-1:0] npc,
  input  logic [WIDTH-1:0] imm,
  input  logic [25:0]      target26,
  output logic             zero,
  output logic             redirect,
  output logic [WIDTH-1:0] target
);
  assign zero     = (rs_val == '0);
  assign redirect = jump | (branch_z & zero) | (branch_nz & ~zero);
  assign target   = jump ? {npc[WIDTH-1:28], target26, 2'b00} : npc + imm;
endmodule
