// tb_decoder: self-checking testbench of the instruction decoder. Encodes
// instructions of every supported kind with random registers and immediates
// (using the assembler of rv_tb_pkg) and checks category, ALU/branch function,
// registers and the sign-extended immediate against the values that were
// encoded. Also checks the worked examples (ADD x3,x2,x1 and BNE x1,x0,-4),
// that MUL is recognised only when enabled, and that malformed words decode
// as unsupported.
module tb_decoder;
  import rv_pkg::*;
  import rv_tb_pkg::enc_r, rv_tb_pkg::enc_i, rv_tb_pkg::enc_s, rv_tb_pkg::enc_b,
         rv_tb_pkg::enc_u, rv_tb_pkg::enc_j;

  word_t  inst;
  dinst_t d, dm;
  int checks = 0, failures = 0;

  decoder #(.EN_MUL(1'b0)) dut     (.inst(inst), .dinst(d));
  decoder #(.EN_MUL(1'b1)) dut_mul (.inst(inst), .dinst(dm));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (inst %h)", what, inst); end
  endtask

  // ALU function of each {funct7[5], funct3} in OP
  function automatic alu_func_e op_func(bit alt, logic [2:0] f3);
    case (f3)
      3'd0: return alt ? ALU_SUB : ALU_ADD;
      3'd1: return ALU_SLL;
      3'd2: return ALU_SLT;
      3'd3: return ALU_SLTU;
      3'd4: return ALU_XOR;
      3'd5: return alt ? ALU_SRA : ALU_SRL;
      3'd6: return ALU_OR;
      default: return ALU_AND;
    endcase
  endfunction

  initial begin
    logic [4:0] rd, rs1, rs2;
    int imm;
    // worked examples
    inst = 32'b0000000_00001_00010_000_00011_0110011; #1;
    check(d.itype == IT_OP && d.alu_func == ALU_ADD && d.dst.valid && d.dst.idx == 3
          && d.src1 == 2 && d.src2 == 1, "ADD x3, x2, x1");
    inst = 32'b1_111111_00000_00001_001_1110_1_1100011; #1;
    check(d.itype == IT_BRANCH && d.br_func == BR_NEQ && d.src1 == 1 && d.src2 == 0
          && d.imm == -32'sd4 && !d.dst.valid, "BNE x1, x0, -4");

    repeat (400) begin
      rd = 5'($urandom); rs1 = 5'($urandom); rs2 = 5'($urandom);
      // OP
      begin
        automatic logic [2:0] f3 = 3'($urandom);
        automatic bit alt = (f3 == 3'd0 || f3 == 3'd5) ? 1'($urandom) : 1'b0;
        inst = enc_r(alt ? 7'h20 : 7'h00, rs2, rs1, f3, rd); #1;
        check(d.itype == IT_OP && d.alu_func == op_func(alt, f3) && d.dst == {1'b1, rd}
              && d.src1 == rs1 && d.src2 == rs2, "OP");
        inst = enc_r(7'h01, rs2, rs1, 3'd0, rd); #1;
        check(d.itype == IT_UNSUPPORTED && dm.itype == IT_MUL && dm.dst == {1'b1, rd}, "MUL");
        inst = enc_r(7'h40, rs2, rs1, f3, rd); #1;
        check(d.itype == IT_UNSUPPORTED && dm.itype == IT_UNSUPPORTED, "bad funct7");
      end
      // OPIMM
      begin
        automatic logic [2:0] f3 = 3'($urandom);
        imm = int'($urandom_range(0, 4095)) - 2048;
        if (f3 == 3'd1) imm = imm & 31;
        if (f3 == 3'd5) imm = (imm & 31) | ($urandom_range(0, 1) ? 32'h400 : 0);
        inst = enc_i(7'b0010011, imm, rs1, f3, rd); #1;
        check(d.itype == IT_OPIMM && d.alu_func == op_func(f3 == 3'd5 && imm[10], f3)
              && d.dst == {1'b1, rd} && d.src1 == rs1
              && (f3 == 3'd1 || f3 == 3'd5 ? d.imm[4:0] == imm[4:0] : d.imm == word_t'(imm)), "OPIMM");
      end
      // loads, stores, jumps, LUI
      imm = int'($urandom_range(0, 4095)) - 2048;
      inst = enc_i(7'b0000011, imm, rs1, 3'd2, rd); #1;
      check(d.itype == IT_LOAD && d.imm == word_t'(imm) && d.dst == {1'b1, rd} && d.src1 == rs1, "LW");
      inst = enc_i(7'b0000011, imm, rs1, 3'd0, rd); #1;
      check(d.itype == IT_UNSUPPORTED, "LB is unsupported");
      inst = enc_s(imm, rs2, rs1); #1;
      check(d.itype == IT_STORE && d.imm == word_t'(imm) && !d.dst.valid && d.src1 == rs1 && d.src2 == rs2, "SW");
      inst = enc_i(7'b1100111, imm, rs1, 3'd0, rd); #1;
      check(d.itype == IT_JALR && d.imm == word_t'(imm) && d.dst == {1'b1, rd}, "JALR");
      begin
        logic [2:0] f3s [6] = '{3'd0, 3'd1, 3'd4, 3'd5, 3'd6, 3'd7};
        br_func_e   fs  [6] = '{BR_EQ, BR_NEQ, BR_LT, BR_GE, BR_LTU, BR_GEU};
        automatic int k = $urandom_range(0, 5);
        imm = 2 * (int'($urandom_range(0, 4095)) - 2048);
        inst = enc_b(f3s[k], rs1, rs2, imm); #1;
        check(d.itype == IT_BRANCH && d.br_func == fs[k] && d.imm == word_t'(imm) && !d.dst.valid, "BRANCH");
        inst = enc_b(3'd2, rs1, rs2, imm); #1;
        check(d.itype == IT_UNSUPPORTED, "branch funct3 010");
      end
      imm = 2 * (int'($urandom_range(0, 1048575)) - 524288);
      inst = enc_j(imm, rd); #1;
      check(d.itype == IT_JAL && d.imm == word_t'(imm) && d.dst == {1'b1, rd}, "JAL");
      begin
        automatic logic [19:0] u = 20'($urandom);
        inst = enc_u(u, rd); #1;
        check(d.itype == IT_LUI && d.imm == {u, 12'b0} && d.dst == {1'b1, rd}, "LUI");
      end
      inst = {20'($urandom), rd, 7'b0010111}; #1;   // AUIPC
      check(d.itype == IT_UNSUPPORTED && !d.dst.valid, "AUIPC is unsupported");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
