// pc_unit: the IF stage's program counter.
//
// The PC register addresses the instruction memory. An adder forms PC + 4 and a
// two-way multiplexer picks the next PC: PC + 4, or the target supplied by the
// branch unit in ID when a branch is taken or a jump is decoded. Because the
// redirect comes from ID, the instruction fetched in the same cycle (the one
// after the branch) is not cancelled: it is a branch delay slot.
//
// Timing: PC loads on the rising edge; synchronous reset to RESET_PC.
module pc_unit #(
  parameter int unsigned WIDTH    = 32,
  parameter logic [31:0] RESET_PC = 32'h0
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             redirect,    // take target
  input  logic [WIDTH-1:0] target,
  output logic [WIDTH-1:0] pc,
  output logic [WIDTH-1:0] pc_plus4
);
  assign pc_plus4 = pc + WIDTH'(4);

  always_ff @(posedge clk) begin
    if (rst)           pc <= WIDTH'(RESET_PC);
    else if (redirect) pc <= target;
    else               pc <= pc_plus4;
  end
endmodule
