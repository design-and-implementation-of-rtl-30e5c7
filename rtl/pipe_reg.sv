// pipe_reg: one inter-stage pipeline register (IF/ID, ID/EX, EX/MEM, MEM/WB).
//
// Holds a value of type T (a packed struct from risc_pkg in the processor).
// On a rising edge it loads d when en is high. A synchronous reset, or a
// synchronous clear (flush), loads all zeros, which in the processor's control
// word is a bubble that writes nothing. The four registers and what crosses
// them follow the processor's block diagram; the generic struct-typed form,
// the enable and the clear are this design's (the processor ties en high and
// clear low, since it neither stalls nor flushes).
module pipe_reg #(
  parameter type T = logic [31:0]
) (
  input  logic clk,
  input  logic rst,
  input  logic en,
  input  logic clear,
  input  T     d,
  output T     q
);
  always_ff @(posedge clk) begin
    if (rst || clear) q <= '0;
    else if (en)      q <= d;
  end
endmodule
