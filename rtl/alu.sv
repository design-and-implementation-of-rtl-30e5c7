// alu: combinational arithmetic/logic unit of the EX stage.
//
// Operands A and B are WIDTH bits wide; the 4-bit alu_sel picks the operation
// (codes in risc_pkg::alu_op_e). Select 0 adds and select 1 subtracts, as in the
// processor's ALU simulations; the remaining codes (AND, OR, XOR, NOR, shifts,
// set-less-than) are this design's assignment. Shifts move A by B[log2(WIDTH)-1:0].
//
// carry_out is the carry of the unsigned sum A + B whatever the select, which
// is what the processor's ALU simulation shows (with A=2, B=1 and subtract
// selected, the 9-bit sum is 3 and the carry is 0). The processor itself does
// not use the carry: MIPS-style instructions have no flags.
//
// Timing: purely combinational; the result is captured by the EX/MEM register.
module alu
  import risc_pkg::*;
#(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  alu_op_e          alu_sel,
  output logic [WIDTH-1:0] y,
  output logic             carry_out
);
  localparam int unsigned SHW = $clog2(WIDTH);

  logic [WIDTH:0]   sum;     // unsigned A + B with carry
  logic [SHW-1:0]   sh;

  assign sum       = {1'b0, a} + {1'b0, b};
  assign carry_out = sum[WIDTH];
  assign sh        = b[SHW-1:0];

  always_comb begin
    unique case (alu_sel)
      ALU_ADD: y = sum[WIDTH-1:0];
      ALU_SUB: y = a - b;
      ALU_AND: y = a & b;
      ALU_OR:  y = a | b;
      ALU_XOR: y = a ^ b;
      ALU_NOR: y = ~(a | b);
      ALU_SLL: y = a << sh;
      ALU_SRL: y = a >> sh;
      ALU_SRA: y = WIDTH'($signed(a) >>> sh);
      ALU_SLT: y = WIDTH'($signed(a) < $signed(b));
      default: y = '0;
    endcase
  end
endmodule
