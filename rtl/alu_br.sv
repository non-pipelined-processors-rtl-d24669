// alu_br: the branch comparator (aluBr).
//
// Purely combinational. Returns taken = 1 when the comparison selected by
// func holds between a and b: equal, not equal, less than or greater-or-equal,
// each of the last two signed or unsigned. The six comparisons are those of
// the six RISC-V conditional branches.
module alu_br
  import rv_pkg::*;
(
  input  word_t    a,
  input  word_t    b,
  input  br_func_e func,
  output logic     taken
);
  always_comb begin
    unique case (func)
      BR_EQ:   taken = (a == b);
      BR_NEQ:  taken = (a != b);
      BR_LT:   taken = ($signed(a) < $signed(b));
      BR_GE:   taken = ($signed(a) >= $signed(b));
      BR_LTU:  taken = (a < b);
      BR_GEU:  taken = (a >= b);
      default: taken = 1'b0;
    endcase
  end
endmodule
