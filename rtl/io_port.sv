// io_port: the processor's input and output ports, reached by the I/O-type
// instructions IN and OUT in the MEM stage.
//
// NUM_PORTS output registers drive port_out; NUM_PORTS inputs arrive on
// port_in. The port number is the low $clog2(NUM_PORTS) bits of the address
// R[rs] + imm computed by the ALU. OUT (we) loads the selected output register
// on the rising edge; IN (re) captures the selected input into rdata on the
// rising edge, which makes rdata the port half of the MEM/WB register.
// out_strobe pulses for one cycle, with out_sel, after each OUT so a device can
// see a write even when the value does not change.
// Output registers clear on synchronous reset. The number of ports and this
// handshake are this design's choice; the processor only says that I/O-type
// instructions read and write ports.
module io_port #(
  parameter int unsigned WIDTH     = 32,
  parameter int unsigned NUM_PORTS = 4
) (
  input  logic                         clk,
  input  logic                         rst,
  input  logic                         we,
  input  logic                         re,
  input  logic [WIDTH-1:0]             addr,
  input  logic [WIDTH-1:0]             wdata,
  output logic [WIDTH-1:0]             rdata,
  input  logic [NUM_PORTS-1:0][WIDTH-1:0] port_in,
  output logic [NUM_PORTS-1:0][WIDTH-1:0] port_out,
  output logic                         out_strobe,
  output logic [$clog2(NUM_PORTS)-1:0] out_sel
);
  localparam int unsigned PW = $clog2(NUM_PORTS);

  logic [PW-1:0] sel;
  assign sel = addr[PW-1:0];

  always_ff @(posedge clk) begin
    if (rst) begin
      port_out   <= '0;
      out_strobe <= 1'b0;
      out_sel    <= '0;
      rdata      <= '0;
    end else begin
      out_strobe <= we;
      if (we) begin
        port_out[sel] <= wdata;
        out_sel       <= sel;
      end
      if (re) rdata <= port_in[sel];
    end
  end
endmodule
