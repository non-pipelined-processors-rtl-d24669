// tb_alu: self-checking testbench of the ALU. Applies corner values and
// random operands to every function and compares with results worked out
// here from the instruction definitions.
module tb_alu;
  import rv_pkg::*;

  word_t a, b, result;
  alu_func_e func;
  int checks = 0, failures = 0;

  alu dut (.a(a), .b(b), .func(func), .result(result));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t model(word_t x, word_t y, alu_func_e f);
    case (f)
      ALU_ADD:  return x + y;
      ALU_SUB:  return x - y;
      ALU_AND:  return x & y;
      ALU_OR:   return x | y;
      ALU_XOR:  return x ^ y;
      ALU_SLT:  return (x[31] != y[31]) ? word_t'(x[31]) : word_t'(x < y);
      ALU_SLTU: return word_t'(x < y);
      ALU_SLL:  return x << (y % 32);
      ALU_SRL:  return x >> (y % 32);
      ALU_SRA: begin
        word_t r = x;
        for (int i = 0; i < int'(y % 32); i++) r = {r[31], r[31:1]};
        return r;
      end
      default:  return '0;
    endcase
  endfunction

  task automatic apply(word_t x, word_t y, alu_func_e f);
    a = x; b = y; func = f;
    #1;
    checks++;
    if (result !== model(x, y, f)) begin
      failures++;
      $display("FAIL: %s %h %h -> %h exp %h", f.name(), x, y, result, model(x, y, f));
    end
  endtask

  initial begin
    word_t corner [6] = '{32'h0, 32'h1, 32'h7fff_ffff, 32'h8000_0000, 32'hffff_ffff, 32'h0000_0021};
    for (int f = 0; f <= int'(ALU_SRA); f++) begin
      foreach (corner[i]) foreach (corner[j]) apply(corner[i], corner[j], alu_func_e'(f));
      repeat (200) apply($urandom, $urandom, alu_func_e'(f));
    end
    // spot values from the instruction tables
    apply(32'd5, 32'hffff_fffb, ALU_ADD);
    apply(32'hffff_fffb, 32'd3, ALU_SRA);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
