// exec_unit: the execute function of the processors.
//
// Purely combinational. Given a decoded instruction, the two register values
// and the pc, computes the executed-instruction record: the value to write
// back (ALU result, immediate, pc+4, or the store data), the effective memory
// address for LW/SW (rs1 + imm), and the next pc (pc+4, pc+imm for a taken
// branch or JAL, (rs1+imm) with bit 0 cleared for JALR). Fields an
// instruction does not use are left at zero. One ALU is shared by OP and
// OPIMM (second operand muxed between rs2 and imm); the branch comparator,
// the pc+4 incrementer, the pc+imm adder and the address adder are separate.
// This follows the described execute function case by case. For MUL the
// record carries the destination and pc+4 only; the product comes from the
// multicycle unit.
module exec_unit
  import rv_pkg::*;
(
  input  dinst_t dinst,
  input  word_t  rval1,
  input  word_t  rval2,
  input  word_t  pc,
  output einst_t einst
);
  word_t alu_b, alu_res, pc_plus4, pc_plus_imm, rs1_plus_imm;
  logic  br_taken;

  assign alu_b = (dinst.itype == IT_OPIMM) ? dinst.imm : rval2;

  alu u_alu (
    .a(rval1), .b(alu_b), .func(dinst.alu_func), .result(alu_res)
  );

  alu_br u_alu_br (
    .a(rval1), .b(rval2), .func(dinst.br_func), .taken(br_taken)
  );

  assign pc_plus4     = pc + 32'd4;
  assign pc_plus_imm  = pc + dinst.imm;
  assign rs1_plus_imm = rval1 + dinst.imm;

  always_comb begin
    einst.itype   = dinst.itype;
    einst.dst     = dinst.dst;
    einst.data    = DWV;
    einst.addr    = DWV;
    einst.next_pc = pc_plus4;
    unique case (dinst.itype)
      IT_OP, IT_OPIMM: einst.data = alu_res;
      IT_BRANCH:       einst.next_pc = br_taken ? pc_plus_imm : pc_plus4;
      IT_LUI:          einst.data = dinst.imm;
      IT_JAL: begin
        einst.data    = pc_plus4;
        einst.next_pc = pc_plus_imm;
      end
      IT_JALR: begin
        einst.data    = pc_plus4;
        einst.next_pc = {rs1_plus_imm[31:1], 1'b0};
      end
      IT_LOAD:  einst.addr = rs1_plus_imm;
      IT_STORE: begin
        einst.data = rval2;
        einst.addr = rs1_plus_imm;
      end
      default: ;  // MUL, UNSUPPORTED: nothing beyond pc+4
    endcase
  end
endmodule
