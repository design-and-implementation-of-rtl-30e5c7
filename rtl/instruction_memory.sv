// instruction_memory: word-organised instruction store of the IF stage.
//
// DEPTH 32-bit words, addressed by a byte address whose two low bits are
// ignored. The read is synchronous, block-RAM style: on a rising edge with
// en high, instr <= mem[addr]. The output register is the instruction half of
// the IF/ID pipeline register, so the fetched instruction is decoded in the
// cycle after the PC presented its address. A synchronous reset clears the
// output register to NOP (all zeros) so the pipeline starts with bubbles.
//
// A separate write port (prog_we/prog_addr/prog_data, byte address) loads the
// program; it is meant to be used while the processor is held in reset.
// The depth is this design's choice; the processor does not give one.
module instruction_memory #(
  parameter int unsigned DEPTH = 256
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        en,
  input  logic [31:0] addr,
  output logic [31:0] instr,
  input  logic        prog_we,
  input  logic [31:0] prog_addr,
  input  logic [31:0] prog_data
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [31:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (prog_we) mem[prog_addr[AW+1:2]] <= prog_data;
  end

  always_ff @(posedge clk) begin
    if (rst)     instr <= '0;
    else if (en) instr <= mem[addr[AW+1:2]];
  end
endmodule
