// data_memory: word data memory of the MEM stage, used by LW and SW.
//
// DEPTH 32-bit words, byte address with the two low bits ignored. Synchronous
// block-RAM style: on a rising edge with en high, a write (we) stores wdata,
// and a read (we low) loads rdata <= mem[addr]. The rdata register is the
// load-data half of the MEM/WB pipeline register. en is raised only for loads
// and stores, so the array and its output register are idle on other cycles;
// that follows the low-power rule of enabling block RAM only while it is read
// or written. The depth is this design's choice.
module data_memory #(
  parameter int unsigned DEPTH = 256
) (
  input  logic        clk,
  input  logic        en,
  input  logic        we,
  input  logic [31:0] addr,
  input  logic [31:0] wdata,
  output logic [31:0] rdata
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [31:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr[AW+1:2]] <= wdata;
      else    rdata <= mem[addr[AW+1:2]];
    end
  end
endmodule
