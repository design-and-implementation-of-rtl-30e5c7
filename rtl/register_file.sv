// register_file: the processor's general-purpose registers.
//
// NUM_REGS registers of WIDTH bits (eight 32-bit registers by default, as the
// processor specifies). Instructions carry 5-bit register fields; only the low
// $clog2(NUM_REGS) bits of a field select a register, the upper bits are
// ignored. Register 0 always reads as zero and ignores writes (MIPS convention,
// this design's choice).
//
// Two asynchronous read ports serve the ID stage; one write port, clocked on
// the rising edge, serves WB. A read of the register being written in the same
// cycle returns the new value (write-before-read), so an instruction in ID
// sees the result of the instruction three ahead of it in WB.
// The registers are cleared by a synchronous reset.
module register_file #(
  parameter int unsigned WIDTH    = 32,
  parameter int unsigned NUM_REGS = 8
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [4:0]       ra1,
  input  logic [4:0]       ra2,
  output logic [WIDTH-1:0] rd1,
  output logic [WIDTH-1:0] rd2,
  input  logic             we,
  input  logic [4:0]       wa,
  input  logic [WIDTH-1:0] wd
);
  localparam int unsigned AW = $clog2(NUM_REGS);

  logic [WIDTH-1:0] regs [NUM_REGS];

  logic [AW-1:0] a1, a2, aw;
  assign a1 = ra1[AW-1:0];
  assign a2 = ra2[AW-1:0];
  assign aw = wa[AW-1:0];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NUM_REGS; i++) regs[i] <= '0;
    end else if (we && aw != '0) begin
      regs[aw] <= wd;
    end
  end

  always_comb begin
    if (a1 == '0)                rd1 = '0;
    else if (we && aw == a1)     rd1 = wd;
    else                         rd1 = regs[a1];
    if (a2 == '0)                rd2 = '0;
    else if (we && aw == a2)     rd2 = wd;
    else                         rd2 = regs[a2];
  end
endmodule
