// alu: the 32-bit arithmetic-logic unit of the processors.
//
// Purely combinational. Computes result = a <func> b for the ten register and
// register-immediate operations of the instruction set: add, subtract, and,
// or, xor, set-if-less-than (signed and unsigned) and the three shifts. Shifts
// use the low 5 bits of b as the shift amount, as RISC-V does. The set of
// functions follows the instruction tables; the insides (a case over the
// function code) are the simplest circuit that does it.
module alu
  import rv_pkg::*;
(
  input  word_t     a,
  input  word_t     b,
  input  alu_func_e func,
  output word_t     result
);
  logic [4:0] shamt;
  assign shamt = b[4:0];

  always_comb begin
    unique case (func)
      ALU_ADD:  result = a + b;
      ALU_SUB:  result = a - b;
      ALU_AND:  result = a & b;
      ALU_OR:   result = a | b;
      ALU_XOR:  result = a ^ b;
      ALU_SLT:  result = {31'b0, $signed(a) < $signed(b)};
      ALU_SLTU: result = {31'b0, a < b};
      ALU_SLL:  result = a << shamt;
      ALU_SRL:  result = a >> shamt;
      ALU_SRA:  result = word_t'($signed(a) >>> shamt);
      default:  result = '0;
    endcase
  end
endmodule
