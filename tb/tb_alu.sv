// tb_alu: self-checking test of the ALU. Replays the two ALU cases of the
// processor's simulations (1 + 1 = 2 and 2 - 1 = 1, carry 0, 9-bit sum 2 and 3)
// at 8 bits, then drives random 32-bit operands through every select and
// compares with a reference computed here.
module tb_alu;
  import risc_pkg::*;
  int checks = 0, failures = 0;

  logic [7:0]  a8, b8, y8;
  logic        c8;
  alu_op_e     sel8;
  alu #(.WIDTH(8)) dut8 (.a(a8), .b(b8), .alu_sel(sel8), .y(y8), .carry_out(c8));

  logic [31:0] a, b, y, exp_y;
  logic        c, exp_c;
  alu_op_e     sel;
  alu #(.WIDTH(32)) dut (.a, .b, .alu_sel(sel), .y, .carry_out(c));

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  function automatic logic [31:0] ref_alu(input alu_op_e op, input logic [31:0] x, input logic [31:0] z);
    logic [63:0] ext;
    int unsigned s;
    s = z % 32;
    case (op)
      ALU_ADD: return x + z;
      ALU_SUB: return x + ~z + 1;
      ALU_AND: return x & z;
      ALU_OR:  return x | z;
      ALU_XOR: return x ^ z;
      ALU_NOR: return ~(x | z);
      ALU_SLL: return x << s;
      ALU_SRL: return x >> s;
      ALU_SRA: begin ext = {{32{x[31]}}, x} >> s; return ext[31:0]; end
      ALU_SLT: begin
        if (x[31] != z[31]) return {31'b0, x[31]};
        return {31'b0, (x < z)};
      end
      default: return 0;
    endcase
  endfunction

  initial begin
    // Figure cases at 8 bits
    a8 = 8'd1; b8 = 8'd1; sel8 = ALU_ADD; #1;
    check(32'(y8), 2, "8-bit 1+1"); check(32'(c8), 0, "8-bit 1+1 carry");
    a8 = 8'd2; b8 = 8'd1; sel8 = ALU_SUB; #1;
    check(32'(y8), 1, "8-bit 2-1"); check(32'(c8), 0, "8-bit 2-1 carry");
    a8 = 8'hFF; b8 = 8'd1; sel8 = ALU_ADD; #1;
    check(32'(y8), 0, "8-bit FF+1"); check(32'(c8), 1, "8-bit FF+1 carry");

    for (int i = 0; i < 2000; i++) begin
      a = $urandom; b = $urandom;
      if (i % 4 == 0) b = b % 40;
      sel = alu_op_e'(i % 10);
      #1;
      exp_y = ref_alu(sel, a, b);
      exp_c = ({1'b0, a} + {1'b0, b}) > 33'hFFFFFFFF;
      check(y, exp_y, $sformatf("op %0d a=%h b=%h", sel, a, b));
      check(32'(c), 32'(exp_c), "carry");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
