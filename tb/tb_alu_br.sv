// tb_alu_br: self-checking testbench of the branch comparator. Every
// comparison on corner and random operand pairs, against a model that
// derives the signed comparison from sign bits and the unsigned one.
module tb_alu_br;
  import rv_pkg::*;

  word_t a, b;
  br_func_e func;
  logic taken;
  int checks = 0, failures = 0;

  alu_br dut (.a(a), .b(b), .func(func), .taken(taken));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic model(word_t x, word_t y, br_func_e f);
    logic lts = (x[31] != y[31]) ? x[31] : (x < y);
    case (f)
      BR_EQ:  return x == y;
      BR_NEQ: return x != y;
      BR_LT:  return lts;
      BR_GE:  return !lts;
      BR_LTU: return x < y;
      BR_GEU: return !(x < y);
      default: return 1'b0;
    endcase
  endfunction

  task automatic apply(word_t x, word_t y, br_func_e f);
    a = x; b = y; func = f;
    #1;
    checks++;
    if (taken !== model(x, y, f)) begin
      failures++;
      $display("FAIL: %s %h %h -> %b", f.name(), x, y, taken);
    end
  endtask

  initial begin
    word_t corner [5] = '{32'h0, 32'h1, 32'h7fff_ffff, 32'h8000_0000, 32'hffff_ffff};
    for (int f = 0; f <= int'(BR_GEU); f++) begin
      foreach (corner[i]) foreach (corner[j]) apply(corner[i], corner[j], br_func_e'(f));
      repeat (100) apply($urandom, $urandom, br_func_e'(f));
      repeat (20) begin word_t v = $urandom; apply(v, v, br_func_e'(f)); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
