// tb_sign_extend: self-checking test of the 16-to-32-bit sign extension,
// exhaustive over all 65536 immediates.
module tb_sign_extend;
  int checks = 0, failures = 0;
  logic [15:0] imm_in;
  logic [31:0] imm_out;
  sign_extend #(.IN_W(16), .OUT_W(32)) dut (.*);

  initial begin
    for (int i = 0; i < 65536; i++) begin
      int signed v;
      imm_in = 16'(i);
      #1;
      v = (i >= 32768) ? i - 65536 : i;
      checks++;
      if (imm_out !== 32'(v)) begin
        failures++;
        if (failures < 10) $display("FAIL imm %h: got %h", imm_in, imm_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
