// decoder: splits a 32-bit RISC-V instruction into the fields the processor
// needs.
//
// Purely combinational. Produces the instruction category (OP, OPIMM,
// BRANCH, JAL, JALR, LUI, LOAD, STORE, and MUL when EN_MUL is set, else
// UNSUPPORTED), the ALU function, the branch function, the destination
// register (absent for BRANCH, STORE and unsupported words; rd = x0 stays
// present and the register file drops that write), the two source registers,
// and the immediate, sign-extended to 32 bits from its I, S, B, U or J encoding.
// src1/src2 are the rs1/rs2 bit fields whatever the category; reading an
// unused register is harmless. Any 32-bit value that is not one of the
// supported instructions (wrong funct3/funct7, LW/SW of other widths, AUIPC,
// FENCE, SYSTEM, ...) decodes as UNSUPPORTED. The field layout is RISC-V's;
// recognising MUL (funct7 = 0000001, funct3 = 000 of OP) is this design's
// choice of a multicycle operation.
module decoder
  import rv_pkg::*;
#(
  parameter bit EN_MUL = 1'b0
) (
  input  word_t  inst,
  output dinst_t dinst
);
  logic [6:0] opcode, funct7;
  logic [2:0] funct3;
  word_t imm_i, imm_s, imm_b, imm_u, imm_j;

  assign opcode = inst[6:0];
  assign funct3 = inst[14:12];
  assign funct7 = inst[31:25];

  assign imm_i = {{20{inst[31]}}, inst[31:20]};
  assign imm_s = {{20{inst[31]}}, inst[31:25], inst[11:7]};
  assign imm_b = {{19{inst[31]}}, inst[31], inst[7], inst[30:25], inst[11:8], 1'b0};
  assign imm_u = {inst[31:12], 12'b0};
  assign imm_j = {{11{inst[31]}}, inst[31], inst[19:12], inst[20], inst[30:21], 1'b0};

  always_comb begin
    dinst.itype     = IT_UNSUPPORTED;
    dinst.alu_func  = ALU_ADD;
    dinst.br_func   = BR_EQ;
    dinst.dst.valid = 1'b0;
    dinst.dst.idx   = inst[11:7];
    dinst.src1      = inst[19:15];
    dinst.src2      = inst[24:20];
    dinst.imm       = DWV;

    unique case (opcode)
      OPC_OP: begin
        dinst.dst.valid = 1'b1;
        unique case ({funct7, funct3})
          {7'b0000000, 3'b000}: begin dinst.itype = IT_OP; dinst.alu_func = ALU_ADD;  end
          {7'b0100000, 3'b000}: begin dinst.itype = IT_OP; dinst.alu_func = ALU_SUB;  end
          {7'b0000000, 3'b001}: begin dinst.itype = IT_OP; dinst.alu_func = ALU_SLL;  end
          {7'b0000000, 3'b010}: begin dinst.itype = IT_OP; dinst.alu_func = ALU_SLT;  end
          {7'b0000000, 3'b011}: begin dinst.itype = IT_OP; dinst.alu_func = ALU_SLTU; end
          {7'b0000000, 3'b100}: begin dinst.itype = IT_OP; dinst.alu_func = ALU_XOR;  end
          {7'b0000000, 3'b101}: begin dinst.itype = IT_OP; dinst.alu_func = ALU_SRL;  end
          {7'b0100000, 3'b101}: begin dinst.itype = IT_OP; dinst.alu_func = ALU_SRA;  end
          {7'b0000000, 3'b110}: begin dinst.itype = IT_OP; dinst.alu_func = ALU_OR;   end
          {7'b0000000, 3'b111}: begin dinst.itype = IT_OP; dinst.alu_func = ALU_AND;  end
          {7'b0000001, 3'b000}: if (EN_MUL) dinst.itype = IT_MUL;
          default: ;
        endcase
        if (dinst.itype == IT_UNSUPPORTED) dinst.dst.valid = 1'b0;
      end
      OPC_OPIMM: begin
        dinst.itype     = IT_OPIMM;
        dinst.dst.valid = 1'b1;
        dinst.imm       = imm_i;
        unique case (funct3)
          3'b000: dinst.alu_func = ALU_ADD;
          3'b010: dinst.alu_func = ALU_SLT;
          3'b011: dinst.alu_func = ALU_SLTU;
          3'b100: dinst.alu_func = ALU_XOR;
          3'b110: dinst.alu_func = ALU_OR;
          3'b111: dinst.alu_func = ALU_AND;
          3'b001: begin
            dinst.alu_func = ALU_SLL;
            if (funct7 != 7'b0000000) dinst.itype = IT_UNSUPPORTED;
          end
          3'b101: begin
            // The arithmetic shift is told apart by imm[10] (inst[30]);
            // the shift amount is imm[4:0].
            dinst.alu_func = (funct7 == 7'b0100000) ? ALU_SRA : ALU_SRL;
            if (funct7 != 7'b0000000 && funct7 != 7'b0100000) dinst.itype = IT_UNSUPPORTED;
          end
          default: dinst.itype = IT_UNSUPPORTED;
        endcase
        if (dinst.itype == IT_UNSUPPORTED) dinst.dst.valid = 1'b0;
      end
      OPC_BRANCH: begin
        dinst.itype = IT_BRANCH;
        dinst.imm   = imm_b;
        unique case (funct3)
          3'b000: dinst.br_func = BR_EQ;
          3'b001: dinst.br_func = BR_NEQ;
          3'b100: dinst.br_func = BR_LT;
          3'b101: dinst.br_func = BR_GE;
          3'b110: dinst.br_func = BR_LTU;
          3'b111: dinst.br_func = BR_GEU;
          default: dinst.itype = IT_UNSUPPORTED;
        endcase
      end
      OPC_JAL: begin
        dinst.itype     = IT_JAL;
        dinst.dst.valid = 1'b1;
        dinst.imm       = imm_j;
      end
      OPC_JALR: begin
        if (funct3 == 3'b000) begin
          dinst.itype     = IT_JALR;
          dinst.dst.valid = 1'b1;
          dinst.imm       = imm_i;
        end
      end
      OPC_LUI: begin
        dinst.itype     = IT_LUI;
        dinst.dst.valid = 1'b1;
        dinst.imm       = imm_u;
      end
      OPC_LOAD: begin
        if (funct3 == 3'b010) begin
          dinst.itype     = IT_LOAD;
          dinst.dst.valid = 1'b1;
          dinst.imm       = imm_i;
        end
      end
      OPC_STORE: begin
        if (funct3 == 3'b010) begin
          dinst.itype = IT_STORE;
          dinst.imm   = imm_s;
        end
      end
      default: ;
    endcase
  end
endmodule
