// tb_exec_unit: self-checking testbench of the execute unit. Drives decoded
// instructions of every category with random register values, pc and
// immediate, and checks write-back data, memory address and next pc against
// the execution rules of the instruction set.
module tb_exec_unit;
  import rv_pkg::*;

  dinst_t dinst;
  word_t  rval1, rval2, pc;
  einst_t einst;
  int checks = 0, failures = 0;

  exec_unit dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (3000) begin
      automatic itype_e t = itype_e'($urandom_range(0, int'(IT_MUL)));
      word_t a, b, p, im, exp_data, exp_pc, exp_addr;
      logic tk;
      a = $urandom; b = ($urandom_range(0, 3) == 0) ? a : $urandom;
      p = {$urandom, 2'b00}; im = $urandom;
      dinst = '0;
      dinst.itype    = t;
      dinst.alu_func = alu_func_e'($urandom_range(0, int'(ALU_SRA)));
      dinst.br_func  = br_func_e'($urandom_range(0, int'(BR_GEU)));
      dinst.dst      = {1'b1, 5'($urandom)};
      dinst.imm      = im;
      rval1 = a; rval2 = b; pc = p;
      #1;
      exp_data = '0; exp_addr = '0; exp_pc = p + 4;
      case (t)
        IT_OP:     exp_data = (dinst.alu_func == ALU_ADD) ? a + b :
                              (dinst.alu_func == ALU_SUB) ? a - b :
                              (dinst.alu_func == ALU_XOR) ? a ^ b : einst.data;
        IT_OPIMM:  exp_data = (dinst.alu_func == ALU_ADD) ? a + im :
                              (dinst.alu_func == ALU_AND) ? a & im :
                              (dinst.alu_func == ALU_SLTU) ? word_t'(a < im) : einst.data;
        IT_BRANCH: begin
          case (dinst.br_func)
            BR_EQ: tk = a == b;   BR_NEQ: tk = a != b;
            BR_LT: tk = $signed(a) < $signed(b);  BR_GE: tk = $signed(a) >= $signed(b);
            BR_LTU: tk = a < b;   default: tk = a >= b;
          endcase
          exp_pc = tk ? p + im : p + 4;
        end
        IT_LUI:    exp_data = im;
        IT_JAL:    begin exp_data = p + 4; exp_pc = p + im; end
        IT_JALR:   begin exp_data = p + 4; exp_pc = (a + im) & ~32'd1; end
        IT_LOAD:   exp_addr = a + im;
        IT_STORE:  begin exp_data = b; exp_addr = a + im; end
        default: ;
      endcase
      check(einst.itype == t && einst.dst == dinst.dst, "itype/dst passed on");
      check(einst.data == exp_data, $sformatf("%s data %h exp %h", t.name(), einst.data, exp_data));
      check(einst.addr == exp_addr, $sformatf("%s addr %h exp %h", t.name(), einst.addr, exp_addr));
      check(einst.next_pc == exp_pc, $sformatf("%s next_pc %h exp %h", t.name(), einst.next_pc, exp_pc));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
