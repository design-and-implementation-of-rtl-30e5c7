// sign_extend: widens the 16-bit immediate of I- and I/O-type instructions to
// a 32-bit two's-complement value by copying bit 15 into the upper bits.
// Combinational; used in the ID stage for ALU immediates, load/store and port
// offsets and branch offsets. The 16-bit field and the 32-bit result follow
// the processor's instruction formats and block diagram.
module sign_extend #(
  parameter int unsigned IN_W  = 16,
  parameter int unsigned OUT_W = 32
) (
  input  logic [IN_W-1:0]  imm_in,
  output logic [OUT_W-1:0] imm_out
);
  assign imm_out = {{(OUT_W-IN_W){imm_in[IN_W-1]}}, imm_in};
endmodule
