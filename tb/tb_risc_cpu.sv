// tb_risc_cpu: end-to-end test of the processor at its default sizes.
//
// Assembles a program in the testbench, loads it through the program port,
// runs it, and compares the final registers, data memory, output ports and
// the sequence of port writes with an instruction-level reference model that
// runs the same program here (sequential semantics plus one branch delay
// slot). The program is scheduled for the pipeline: every consumer is at least
// three instructions after its producer. It exercises R-type ALU and shift
// instructions (the paper-style "ADD R1,R2,R3" and "SRL R1,R2,R3" included),
// ADDI/SUBI, LW, SW, IN, OUT, BEQZ and BNEZ taken and not taken, J, delay
// slots, and the register file's same-cycle write-before-read. It checks the
// pipeline timing (instruction k of a straight run writes its register at
// rising edge k + 5 after reset) and counts how often each mechanism occurred,
// failing any that never did.
module tb_risc_cpu;
  import risc_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst;
  logic prog_we;
  logic [31:0] prog_addr, prog_data, pc;
  logic [3:0][31:0] io_in, io_out;
  logic io_out_strobe;
  logic [1:0] io_out_sel;

  risc_cpu dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // ------------------------------------------------------------ assembler
  function automatic logic [31:0] R(funct_e fn, int rd, int rs, int rt, int sh = 0);
    return {OP_RTYPE, 5'(rs), 5'(rt), 5'(rd), 5'(sh), fn};
  endfunction
  function automatic logic [31:0] I(opcode_e op, int rt, int rs, int imm);
    return {op, 5'(rs), 5'(rt), 16'(imm)};
  endfunction
  function automatic logic [31:0] J(int word_addr);
    return {OP_J, 26'(word_addr)};
  endfunction
  // branch at word b to word t: offset from the following instruction, bytes
  function automatic logic [31:0] B(opcode_e op, int rs, int b, int t);
    return {op, 5'(rs), 5'd0, 16'((t - (b + 1)) * 4)};
  endfunction

  localparam int N = 48;
  logic [31:0] prog [N];

  initial begin
    for (int i = 0; i < N; i++) prog[i] = NOP;
    prog[0]  = I(OP_IN,   1, 0, 0);          // r1 = port0
    prog[1]  = I(OP_IN,   2, 0, 1);          // r2 = port1
    prog[2]  = I(OP_ADDI, 3, 0, 4);          // r3 = 4
    prog[3]  = I(OP_ADDI, 4, 0, -2);         // r4 = -2
    prog[4]  = R(FN_ADD,  5, 1, 2);          // ADD R5,R1,R2
    prog[5]  = R(FN_SUB,  6, 1, 2);          // SUB R6,R1,R2
    prog[6]  = I(OP_SUBI, 3, 3, 0);          // r3 = r3 - 0
    prog[7]  = R(FN_SRL,  7, 5, 2);          // SRL R7,R5,R2
    prog[8]  = I(OP_SW,   5, 0, 0);          // mem[0] = r5
    prog[9]  = I(OP_SW,   6, 0, 4);          // mem[4] = r6
    prog[10] = I(OP_OUT,  7, 0, 3);          // port3 = r7
    prog[11] = I(OP_LW,   1, 0, 0);          // r1 = mem[0]
    prog[12] = I(OP_LW,   2, 0, 4);          // r2 = mem[4]
    prog[13] = R(FN_SRA,  4, 4, 4);          // r4 = -2 >>> 30
    prog[14] = NOP;
    prog[15] = R(FN_SLT,  7, 2, 1);          // r7 = r2 < r1
    // loop: r5 += r1, four times; OUT r5 in each delay slot
    prog[16] = R(FN_ADD,  5, 5, 1);
    prog[17] = I(OP_SUBI, 3, 3, 1);
    prog[18] = NOP;
    prog[19] = NOP;
    prog[20] = B(OP_BNEZ, 3, 20, 16);
    prog[21] = I(OP_OUT,  5, 0, 2);          // delay slot
    prog[22] = J(26);
    prog[23] = I(OP_ADDI, 6, 0, 99);         // delay slot: executes
    prog[24] = I(OP_ADDI, 6, 0, 55);         // skipped
    prog[25] = I(OP_ADDI, 6, 0, 66);         // skipped
    prog[26] = B(OP_BEQZ, 0, 26, 30);        // taken
    prog[27] = R(FN_XOR,  4, 1, 2);          // delay slot
    prog[28] = I(OP_ADDI, 7, 0, 77);         // reached once, from word 30
    prog[29] = J(32);
    prog[30] = B(OP_BEQZ, 6, 30, 28);        // not taken (r6 = 99)
    prog[31] = B(OP_BNEZ, 6, 31, 28);        // taken
    prog[32] = NOP;                          // delay slot of 31 / 29
    prog[33] = I(OP_SW,   5, 0, 8);
    prog[34] = R(FN_AND,  1, 1, 2);
    prog[35] = R(FN_OR,   2, 5, 6);
    prog[36] = R(FN_NOR,  3, 4, 0);
    prog[37] = R(FN_SLLI, 6, 6, 0, 4);
    prog[38] = I(OP_ANDI, 4, 5, 16'h00F0);
    prog[39] = I(OP_ORI,  7, 7, 16'h0100);
    prog[40] = R(FN_SRLI, 5, 2, 0, 1);
    prog[41] = R(FN_SLL,  1, 1, 2);
    prog[42] = I(OP_OUT,  6, 0, 1);
    prog[43] = I(OP_SW,   4, 0, 12);
    prog[44] = J(44);                        // halt
    prog[45] = NOP;
  end

  // ---------------------------------------------- instruction-level model
  logic [31:0] m_reg [8];
  logic [31:0] m_mem [4];
  logic [31:0] m_port [4];
  logic [31:0] m_outs [$];
  logic [31:0] m_out_port [$];
  logic [31:0] in_vals [4] = '{32'd10, 32'd3, 32'hDEAD_0001, 32'h1234_5678};

  task automatic run_model();
    int p, next_pc, pend;
    bit have_pend;
    for (int i = 0; i < 8; i++) m_reg[i] = 0;
    for (int i = 0; i < 4; i++) begin m_mem[i] = 0; m_port[i] = 0; end
    p = 0; have_pend = 0;
    for (int step = 0; step < 300; step++) begin
      logic [31:0] w, a, b, res, simm, addr;
      int rs, rt, rd, sh;
      bit redirect, wr;
      int wreg, tgt;
      w = prog[p];
      rs = int'(w[23:21]); rt = int'(w[18:16]); rd = int'(w[13:11]); sh = int'(w[10:6]);
      a = m_reg[rs]; b = m_reg[rt];
      simm = {{16{w[15]}}, w[15:0]};
      redirect = 0; wr = 0; wreg = 0; res = 0; tgt = 0;
      addr = a + simm;
      case (w[31:26])
        OP_RTYPE: begin
          wr = 1; wreg = rd;
          case (w[5:0])
            FN_ADD: res = a + b;   FN_SUB: res = a - b;
            FN_AND: res = a & b;   FN_OR:  res = a | b;
            FN_XOR: res = a ^ b;   FN_NOR: res = ~(a | b);
            FN_SLT: res = ($signed(a) < $signed(b)) ? 1 : 0;
            FN_SLL: res = a << b[4:0];  FN_SRL: res = a >> b[4:0];
            FN_SRA: res = $signed(a) >>> b[4:0];
            FN_SLLI: res = a << sh;  FN_SRLI: res = a >> sh;
            FN_SRAI: res = $signed(a) >>> sh;
            default: wr = 0;
          endcase
        end
        OP_ADDI: begin wr = 1; wreg = rt; res = a + simm; end
        OP_SUBI: begin wr = 1; wreg = rt; res = a - simm; end
        OP_ANDI: begin wr = 1; wreg = rt; res = a & simm; end
        OP_ORI:  begin wr = 1; wreg = rt; res = a | simm; end
        OP_LW:   begin wr = 1; wreg = rt; res = m_mem[addr[3:2]]; end
        OP_SW:   m_mem[addr[3:2]] = b;
        OP_IN:   begin wr = 1; wreg = rt; res = in_vals[addr[1:0]]; end
        OP_OUT:  begin m_port[addr[1:0]] = b; m_outs.push_back(b); m_out_port.push_back(32'(addr[1:0])); end
        OP_BEQZ: if (a == 0) begin redirect = 1; tgt = (p + 1) * 4 + int'($signed(simm)); end
        OP_BNEZ: if (a != 0) begin redirect = 1; tgt = (p + 1) * 4 + int'($signed(simm)); end
        OP_J:    begin redirect = 1; tgt = int'(w[25:0]) * 4; end
        default: ;
      endcase
      if (wr && wreg != 0) m_reg[wreg] = res;
      next_pc = have_pend ? pend : p + 1;
      have_pend = 0;
      if (redirect) begin have_pend = 1; pend = tgt / 4; end
      p = next_pc;
    end
  endtask

  // ------------------------------------------------- mechanism counters
  int edges = 0;
  int n_br_taken = 0, n_br_not = 0, n_jump = 0, n_load = 0, n_store = 0;
  int n_in = 0, n_out = 0, n_rf_bypass = 0, n_delay_slot = 0, n_dmem_idle = 0;
  int first_w3 = -1, first_w7 = -1;
  bit redirect_prev = 0;
  logic [31:0] outs [$];
  logic [31:0] out_ports [$];

  always @(posedge clk) if (!rst) begin
    edges++;
    if ((dut.id_ctrl.branch_z || dut.id_ctrl.branch_nz) &&  dut.br_redirect) n_br_taken++;
    if ((dut.id_ctrl.branch_z || dut.id_ctrl.branch_nz) && !dut.br_redirect) n_br_not++;
    if (dut.id_ctrl.jump) n_jump++;
    if (redirect_prev && dut.ir != NOP) n_delay_slot++;
    redirect_prev = dut.br_redirect;
    if (dut.ex_mem_q.ctrl.mem_read)  n_load++;
    if (dut.ex_mem_q.ctrl.mem_write) n_store++;
    if (dut.ex_mem_q.ctrl.io_read)   n_in++;
    if (!(dut.ex_mem_q.ctrl.mem_read || dut.ex_mem_q.ctrl.mem_write)) n_dmem_idle++;
    if (io_out_strobe) begin n_out++; outs.push_back(io_out[io_out_sel]); out_ports.push_back(32'(io_out_sel)); end
    if (dut.wb_we && dut.wb_reg[2:0] != 0 && dut.ir != NOP &&
        (dut.ir[23:21] == dut.wb_reg[2:0] || dut.ir[18:16] == dut.wb_reg[2:0])) n_rf_bypass++;
    if (dut.wb_we && dut.wb_reg == 3 && first_w3 < 0) first_w3 = edges;
    if (dut.wb_we && dut.wb_reg == 7 && first_w7 < 0) first_w7 = edges;
  end

  initial begin
    rst = 1; prog_we = 0; prog_addr = 0; prog_data = 0;
    for (int i = 0; i < 4; i++) io_in[i] = in_vals[i];
    #1;
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      prog_we = 1; prog_addr = 32'(i * 4); prog_data = prog[i];
    end
    @(negedge clk); prog_we = 0;
    @(negedge clk); rst = 0;
    run_model();
    repeat (200) @(posedge clk);
    #1;
    for (int r = 1; r < 8; r++) check(dut.u_rf.regs[r], m_reg[r], $sformatf("r%0d", r));
    for (int k = 0; k < 4; k++) check(dut.u_dmem.mem[k], m_mem[k], $sformatf("mem[%0d]", k));
    for (int k = 0; k < 4; k++) check(io_out[k], m_port[k], $sformatf("port %0d", k));
    // the loop's output sequence: the first 13+... value written each pass
    check(32'(outs.size()), 32'(m_outs.size()), "number of OUT writes");
    for (int k = 0; k < outs.size() && k < m_outs.size(); k++) begin
      check(outs[k], m_outs[k], $sformatf("OUT value %0d", k));
      check(out_ports[k], m_out_port[k], $sformatf("OUT port %0d", k));
    end
    // timing: instruction k of the straight run writes at edge k + 5
    check(32'(first_w3), 32'(2 + 5), "ADDI r3 (word 2) write edge");
    check(32'(first_w7), 32'(7 + 5), "SRL r7 (word 7) write edge");
    // spot values worked out by hand
    check(m_reg[6], 32'd99 << 4, "hand: r6 = 99 << 4");
    check(m_mem[0], 32'd13, "hand: ADD 10+3 stored");
    check(m_mem[1], 32'd7, "hand: SUB 10-3 stored");
    check(m_mem[2], 32'd65, "hand: 13 + 4*13");

    $display("mechanisms: br_taken=%0d br_not_taken=%0d jump=%0d delay_slot=%0d load=%0d store=%0d in=%0d out=%0d rf_bypass=%0d dmem_idle=%0d",
             n_br_taken, n_br_not, n_jump, n_delay_slot, n_load, n_store, n_in, n_out, n_rf_bypass, n_dmem_idle);
    if (n_br_taken == 0)   begin failures++; $display("FAIL no taken branch"); end
    if (n_br_not == 0)     begin failures++; $display("FAIL no untaken branch"); end
    if (n_jump == 0)       begin failures++; $display("FAIL no jump"); end
    if (n_delay_slot == 0) begin failures++; $display("FAIL no delay slot"); end
    if (n_load == 0)       begin failures++; $display("FAIL no load"); end
    if (n_store == 0)      begin failures++; $display("FAIL no store"); end
    if (n_in == 0)         begin failures++; $display("FAIL no IN"); end
    if (n_out == 0)        begin failures++; $display("FAIL no OUT"); end
    if (n_rf_bypass == 0)  begin failures++; $display("FAIL no write-before-read"); end
    if (n_dmem_idle == 0)  begin failures++; $display("FAIL data memory never idle"); end
    checks += 10;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
