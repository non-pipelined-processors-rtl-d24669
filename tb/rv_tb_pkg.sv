// rv_tb_pkg: testbench helpers for the RISC-V processors.
//
// Instruction encoders (a tiny assembler) and a reference instruction-set
// model, written straight from the RISC-V instruction definitions and
// independent of the RTL. The model runs a program on its own copy of memory
// and counts the instructions of each kind, from which the testbenches work
// out the expected final memory and the expected cycle counts.
package rv_tb_pkg;

  typedef logic [31:0] word_t;

  // ---------------- encoders ----------------
  function automatic word_t enc_r(input logic [6:0] f7, input logic [4:0] rs2, rs1,
                                  input logic [2:0] f3, input logic [4:0] rd);
    return {f7, rs2, rs1, f3, rd, 7'b0110011};
  endfunction
  function automatic word_t enc_i(input logic [6:0] opc, input int imm, input logic [4:0] rs1,
                                  input logic [2:0] f3, input logic [4:0] rd);
    logic [11:0] i = imm[11:0];
    return {i, rs1, f3, rd, opc};
  endfunction
  function automatic word_t enc_s(input int imm, input logic [4:0] rs2, rs1);
    logic [11:0] i = imm[11:0];
    return {i[11:5], rs2, rs1, 3'b010, i[4:0], 7'b0100011};
  endfunction
  function automatic word_t enc_b(input logic [2:0] f3, input logic [4:0] rs1, rs2, input int off);
    logic [12:0] i = off[12:0];
    return {i[12], i[10:5], rs2, rs1, f3, i[4:1], i[11], 7'b1100011};
  endfunction
  function automatic word_t enc_u(input logic [19:0] imm, input logic [4:0] rd);
    return {imm, rd, 7'b0110111};
  endfunction
  function automatic word_t enc_j(input int off, input logic [4:0] rd);
    logic [20:0] i = off[20:0];
    return {i[20], i[10:1], i[11], i[19:12], rd, 7'b1101111};
  endfunction

  function automatic word_t ADD (logic [4:0] rd, rs1, rs2); return enc_r(7'h00, rs2, rs1, 3'd0, rd); endfunction
  function automatic word_t SUB (logic [4:0] rd, rs1, rs2); return enc_r(7'h20, rs2, rs1, 3'd0, rd); endfunction
  function automatic word_t SLL (logic [4:0] rd, rs1, rs2); return enc_r(7'h00, rs2, rs1, 3'd1, rd); endfunction
  function automatic word_t SLT (logic [4:0] rd, rs1, rs2); return enc_r(7'h00, rs2, rs1, 3'd2, rd); endfunction
  function automatic word_t SLTU(logic [4:0] rd, rs1, rs2); return enc_r(7'h00, rs2, rs1, 3'd3, rd); endfunction
  function automatic word_t XOR (logic [4:0] rd, rs1, rs2); return enc_r(7'h00, rs2, rs1, 3'd4, rd); endfunction
  function automatic word_t SRL (logic [4:0] rd, rs1, rs2); return enc_r(7'h00, rs2, rs1, 3'd5, rd); endfunction
  function automatic word_t SRA (logic [4:0] rd, rs1, rs2); return enc_r(7'h20, rs2, rs1, 3'd5, rd); endfunction
  function automatic word_t OR  (logic [4:0] rd, rs1, rs2); return enc_r(7'h00, rs2, rs1, 3'd6, rd); endfunction
  function automatic word_t AND (logic [4:0] rd, rs1, rs2); return enc_r(7'h00, rs2, rs1, 3'd7, rd); endfunction
  function automatic word_t MUL (logic [4:0] rd, rs1, rs2); return enc_r(7'h01, rs2, rs1, 3'd0, rd); endfunction
  function automatic word_t ADDI (logic [4:0] rd, rs1, int imm); return enc_i(7'b0010011, imm, rs1, 3'd0, rd); endfunction
  function automatic word_t SLTI (logic [4:0] rd, rs1, int imm); return enc_i(7'b0010011, imm, rs1, 3'd2, rd); endfunction
  function automatic word_t SLTIU(logic [4:0] rd, rs1, int imm); return enc_i(7'b0010011, imm, rs1, 3'd3, rd); endfunction
  function automatic word_t XORI (logic [4:0] rd, rs1, int imm); return enc_i(7'b0010011, imm, rs1, 3'd4, rd); endfunction
  function automatic word_t ORI  (logic [4:0] rd, rs1, int imm); return enc_i(7'b0010011, imm, rs1, 3'd6, rd); endfunction
  function automatic word_t ANDI (logic [4:0] rd, rs1, int imm); return enc_i(7'b0010011, imm, rs1, 3'd7, rd); endfunction
  function automatic word_t SLLI (logic [4:0] rd, rs1, int sh); return enc_i(7'b0010011, sh & 31, rs1, 3'd1, rd); endfunction
  function automatic word_t SRLI (logic [4:0] rd, rs1, int sh); return enc_i(7'b0010011, sh & 31, rs1, 3'd5, rd); endfunction
  function automatic word_t SRAI (logic [4:0] rd, rs1, int sh); return enc_i(7'b0010011, (sh & 31) | 32'h400, rs1, 3'd5, rd); endfunction
  function automatic word_t LW  (logic [4:0] rd, rs1, int imm); return enc_i(7'b0000011, imm, rs1, 3'd2, rd); endfunction
  function automatic word_t JALR(logic [4:0] rd, rs1, int imm); return enc_i(7'b1100111, imm, rs1, 3'd0, rd); endfunction
  function automatic word_t SW  (logic [4:0] rs2, rs1, int imm); return enc_s(imm, rs2, rs1); endfunction
  function automatic word_t BEQ (logic [4:0] rs1, rs2, int off); return enc_b(3'd0, rs1, rs2, off); endfunction
  function automatic word_t BNE (logic [4:0] rs1, rs2, int off); return enc_b(3'd1, rs1, rs2, off); endfunction
  function automatic word_t BLT (logic [4:0] rs1, rs2, int off); return enc_b(3'd4, rs1, rs2, off); endfunction
  function automatic word_t BGE (logic [4:0] rs1, rs2, int off); return enc_b(3'd5, rs1, rs2, off); endfunction
  function automatic word_t BLTU(logic [4:0] rs1, rs2, int off); return enc_b(3'd6, rs1, rs2, off); endfunction
  function automatic word_t BGEU(logic [4:0] rs1, rs2, int off); return enc_b(3'd7, rs1, rs2, off); endfunction
  function automatic word_t LUI (logic [4:0] rd, logic [19:0] imm); return enc_u(imm, rd); endfunction
  function automatic word_t JAL (logic [4:0] rd, int off); return enc_j(off, rd); endfunction

  // ---------------- reference model ----------------
  typedef enum int {K_ALU, K_BRANCH, K_JUMP, K_LUI, K_LOAD, K_STORE, K_MUL, K_NKINDS} kind_e;

  class rv_iss;
    word_t mem [int];          // word index -> word
    word_t x [32];
    word_t pc;
    int    count [K_NKINDS];
    int    total;
    bit    halted, illegal;
    word_t exit_code;
    word_t tohost;
    bit    has_mul;
    int    mem_words;

    function new(word_t tohost_addr, int words, bit with_mul);
      tohost    = tohost_addr;
      mem_words = words;
      has_mul   = with_mul;
      reset();
    endfunction

    function void reset();
      foreach (x[i]) x[i] = '0;
      pc = '0; total = 0; halted = 0; illegal = 0; exit_code = '0;
      foreach (count[i]) count[i] = 0;
    endfunction

    function word_t rd_mem(word_t a);
      int idx = int'((a >> 2) % word_t'(mem_words));
      return mem.exists(idx) ? mem[idx] : '0;
    endfunction

    function void wr_mem(word_t a, word_t d);
      mem[int'((a >> 2) % word_t'(mem_words))] = d;
    endfunction

    function void step();
      word_t in = rd_mem(pc);
      logic [6:0] opc = in[6:0], f7 = in[31:25];
      logic [2:0] f3 = in[14:12];
      logic [4:0] rd = in[11:7], rs1 = in[19:15], rs2 = in[24:20];
      word_t a = x[rs1], b = x[rs2];
      word_t ii = {{20{in[31]}}, in[31:20]};
      word_t is = {{20{in[31]}}, in[31:25], in[11:7]};
      word_t ib = {{19{in[31]}}, in[31], in[7], in[30:25], in[11:8], 1'b0};
      word_t ij = {{11{in[31]}}, in[31], in[19:12], in[20], in[30:21], 1'b0};
      word_t npc = pc + 4;
      word_t res = '0;
      bit    wr = 0, ok = 1, tk = 0;
      kind_e k = K_ALU;
      case (opc)
        7'b0110011: begin
          wr = 1;
          case ({f7, f3})
            {7'h00, 3'd0}: res = a + b;
            {7'h20, 3'd0}: res = a - b;
            {7'h00, 3'd1}: res = a << b[4:0];
            {7'h00, 3'd2}: res = ($signed(a) < $signed(b)) ? 1 : 0;
            {7'h00, 3'd3}: res = (a < b) ? 1 : 0;
            {7'h00, 3'd4}: res = a ^ b;
            {7'h00, 3'd5}: res = a >> b[4:0];
            {7'h20, 3'd5}: res = $signed(a) >>> b[4:0];
            {7'h00, 3'd6}: res = a | b;
            {7'h00, 3'd7}: res = a & b;
            {7'h01, 3'd0}: if (has_mul) begin res = a * b; k = K_MUL; end else ok = 0;
            default: ok = 0;
          endcase
        end
        7'b0010011: begin
          wr = 1;
          case (f3)
            3'd0: res = a + ii;
            3'd2: res = ($signed(a) < $signed(ii)) ? 1 : 0;
            3'd3: res = (a < ii) ? 1 : 0;
            3'd4: res = a ^ ii;
            3'd6: res = a | ii;
            3'd7: res = a & ii;
            3'd1: if (f7 == 0) res = a << in[24:20]; else ok = 0;
            3'd5: if (f7 == 0) res = a >> in[24:20];
                  else if (f7 == 7'h20) res = $signed(a) >>> in[24:20];
                  else ok = 0;
            default: ok = 0;
          endcase
        end
        7'b1100011: begin
          k = K_BRANCH;
          case (f3)
            3'd0: tk = (a == b);
            3'd1: tk = (a != b);
            3'd4: tk = ($signed(a) < $signed(b));
            3'd5: tk = ($signed(a) >= $signed(b));
            3'd6: tk = (a < b);
            3'd7: tk = (a >= b);
            default: ok = 0;
          endcase
          if (tk) npc = pc + ib;
        end
        7'b1101111: begin k = K_JUMP; wr = 1; res = pc + 4; npc = pc + ij; end
        7'b1100111: if (f3 == 0) begin
          k = K_JUMP; wr = 1; res = pc + 4; npc = (a + ii) & ~32'd1;
        end else ok = 0;
        7'b0110111: begin k = K_LUI; wr = 1; res = {in[31:12], 12'b0}; end
        7'b0000011: if (f3 == 3'd2) begin k = K_LOAD; wr = 1; res = rd_mem(a + ii); end
                    else ok = 0;
        7'b0100011: if (f3 == 3'd2) begin
          k = K_STORE;
          wr_mem(a + is, b);
          if (a + is == tohost) begin halted = 1; exit_code = b; end
        end else ok = 0;
        default: ok = 0;
      endcase
      if (!ok) begin
        halted = 1; illegal = 1;
        return;
      end
      if (wr && rd != 0) x[rd] = res;
      pc = npc;
      count[k]++;
      total++;
    endfunction

    function void run(int max_steps);
      for (int i = 0; i < max_steps && !halted; i++) step();
    endfunction
  endclass

  // Cycle cost of each kind on the multicycle processor with a memory of
  // latency L and a multiplier of W cycles, as counted from one instruction
  // fetch to the next.
  function automatic int mc_cycles(kind_e k, int L, int W, bit early);
    int fetch = early ? 0 : 1;     // the FETCH state's cycle
    int wait_i = L - 1;            // extra cycles until the instruction arrives
    case (k)
      K_LOAD:  return fetch + wait_i + 1 + L;
      K_STORE: return 1 + wait_i + 1;          // a store always goes through FETCH
      K_MUL:   return fetch + wait_i + 1 + W + 1;
      default: return fetch + wait_i + 1;
    endcase
  endfunction

  // ---------------- test programs ----------------
  localparam word_t DATA_BASE = 32'h0000_2000;   // data region
  localparam word_t DUMP_BASE = 32'h0000_0780;   // x1..x31 dumped here

  // Store x1..x31 to DUMP_BASE (x0-relative, so no register is disturbed)
  // and write 0 to the tohost word at 0x3FFC. Programs must stay below
  // DUMP_BASE.
  function automatic void emit_epilogue(ref word_t p[$]);
    for (int r = 1; r < 32; r++) p.push_back(SW(5'(r), 5'd0, int'(DUMP_BASE) + 4*r));
    p.push_back(LUI(5'd30, 20'h4));            // x30 = 0x4000
    p.push_back(SW(5'd0, 5'd30, -4));          // tohost = 0
  endfunction

  // A directed program that uses every supported instruction at least once.
  function automatic void build_directed(ref word_t p[$], input bit with_mul);
    p.delete();
    p.push_back(LUI (5'd1, 20'h12345));
    p.push_back(ADDI(5'd1, 5'd1, 12'h678));
    p.push_back(ADDI(5'd2, 5'd0, -5));
    p.push_back(ADDI(5'd3, 5'd0, 3));
    p.push_back(ADD (5'd4, 5'd1, 5'd2));
    p.push_back(SUB (5'd5, 5'd2, 5'd3));
    p.push_back(SLL (5'd6, 5'd1, 5'd3));
    p.push_back(SLT (5'd7, 5'd2, 5'd3));
    p.push_back(SLTU(5'd8, 5'd2, 5'd3));
    p.push_back(XOR (5'd9, 5'd1, 5'd2));
    p.push_back(SRL (5'd10, 5'd2, 5'd3));
    p.push_back(SRA (5'd11, 5'd2, 5'd3));
    p.push_back(OR  (5'd12, 5'd1, 5'd3));
    p.push_back(AND (5'd13, 5'd1, 5'd2));
    p.push_back(SLTI (5'd14, 5'd2, -4));
    p.push_back(SLTIU(5'd15, 5'd3, -1));
    p.push_back(XORI (5'd16, 5'd1, -1));
    p.push_back(ORI  (5'd17, 5'd3, 12'h7f0));
    p.push_back(ANDI (5'd18, 5'd1, 12'h0ff));
    p.push_back(SLLI (5'd19, 5'd3, 31));
    p.push_back(SRLI (5'd20, 5'd2, 28));
    p.push_back(SRAI (5'd21, 5'd2, 1));
    // loop: x22 = 10 + 9 + ... + 1
    p.push_back(ADDI(5'd22, 5'd0, 0));
    p.push_back(ADDI(5'd23, 5'd0, 10));
    p.push_back(ADD (5'd22, 5'd22, 5'd23));
    p.push_back(ADDI(5'd23, 5'd23, -1));
    p.push_back(BNE (5'd23, 5'd0, -8));
    // every branch kind, taken and not taken; x24 counts what is executed
    p.push_back(ADDI(5'd24, 5'd0, 1));
    p.push_back(BGE (5'd2, 5'd3, 8));          // -5 >= 3 : not taken
    p.push_back(ADDI(5'd24, 5'd24, 2));
    p.push_back(BLTU(5'd3, 5'd2, 8));          // 3 <u 0xFFFFFFFB : taken
    p.push_back(ADDI(5'd24, 5'd24, 100));
    p.push_back(BGEU(5'd2, 5'd3, 8));          // taken
    p.push_back(ADDI(5'd24, 5'd24, 200));
    p.push_back(BEQ (5'd0, 5'd0, 8));          // taken
    p.push_back(ADDI(5'd24, 5'd24, 400));
    p.push_back(BLT (5'd2, 5'd3, 8));          // taken
    p.push_back(ADDI(5'd24, 5'd24, 800));
    p.push_back(BEQ (5'd2, 5'd3, 8));          // not taken
    p.push_back(ADDI(5'd24, 5'd24, 4));
    p.push_back(BLT (5'd3, 5'd2, 8));          // not taken
    p.push_back(ADDI(5'd24, 5'd24, 8));
    p.push_back(BLTU(5'd2, 5'd3, 8));          // not taken
    p.push_back(ADDI(5'd24, 5'd24, 16));
    p.push_back(BGEU(5'd3, 5'd2, 8));          // not taken
    p.push_back(ADDI(5'd24, 5'd24, 32));
    p.push_back(BNE (5'd3, 5'd3, 8));          // not taken
    p.push_back(ADDI(5'd24, 5'd24, 64));
    p.push_back(BGE (5'd3, 5'd2, 8));          // taken
    p.push_back(ADDI(5'd24, 5'd24, 1600));
    // jumps
    p.push_back(JAL (5'd25, 8));
    p.push_back(ADDI(5'd24, 5'd24, 1000));
    p.push_back(JAL (5'd26, 4));               // x26 = address of the JALR below
    p.push_back(JALR(5'd27, 5'd26, 13));       // target x26+12, bit 0 cleared
    p.push_back(ADDI(5'd24, 5'd24, 1000));
    p.push_back(ADDI(5'd24, 5'd24, 1000));
    // memory
    p.push_back(LUI (5'd29, 20'h2));
    p.push_back(SW  (5'd1, 5'd29, 0));
    p.push_back(SW  (5'd2, 5'd29, 4));
    p.push_back(LW  (5'd30, 5'd29, 0));
    p.push_back(LW  (5'd31, 5'd29, 4));
    p.push_back(ADD (5'd28, 5'd30, 5'd31));
    p.push_back(SW  (5'd28, 5'd29, -8));
    p.push_back(LW  (5'd30, 5'd29, -8));
    if (with_mul) begin
      p.push_back(MUL(5'd5, 5'd1, 5'd2));
      p.push_back(MUL(5'd6, 5'd30, 5'd3));
      p.push_back(ADD(5'd7, 5'd5, 5'd6));
    end
    emit_epilogue(p);
  endfunction

  // A random straight-line program with forward branches, loads and stores.
  function automatic void build_random(ref word_t p[$], input int n, input bit with_mul);
    p.delete();
    for (int r = 1; r < 29; r++) begin
      p.push_back(LUI (5'(r), 20'($urandom)));
      p.push_back(ADDI(5'(r), 5'(r), int'($urandom_range(0, 4095))));
    end
    p.push_back(LUI(5'd29, 20'h2));            // x29 = data base, kept fixed
    for (int k = 0; k < n; k++) begin
      logic [4:0] rd  = 5'($urandom_range(1, 28));
      logic [4:0] rs1 = 5'($urandom_range(0, 28));
      logic [4:0] rs2 = 5'($urandom_range(0, 28));
      int imm = int'($urandom_range(0, 4095)) - 2048;
      int sel = int'($urandom_range(0, with_mul ? 25 : 24));
      case (sel)
        0: p.push_back(ADD(rd, rs1, rs2));   1: p.push_back(SUB(rd, rs1, rs2));
        2: p.push_back(SLL(rd, rs1, rs2));   3: p.push_back(SLT(rd, rs1, rs2));
        4: p.push_back(SLTU(rd, rs1, rs2));  5: p.push_back(XOR(rd, rs1, rs2));
        6: p.push_back(SRL(rd, rs1, rs2));   7: p.push_back(SRA(rd, rs1, rs2));
        8: p.push_back(OR(rd, rs1, rs2));    9: p.push_back(AND(rd, rs1, rs2));
        10: p.push_back(ADDI(rd, rs1, imm)); 11: p.push_back(SLTI(rd, rs1, imm));
        12: p.push_back(SLTIU(rd, rs1, imm)); 13: p.push_back(XORI(rd, rs1, imm));
        14: p.push_back(ORI(rd, rs1, imm));  15: p.push_back(ANDI(rd, rs1, imm));
        16: p.push_back(SLLI(rd, rs1, imm)); 17: p.push_back(SRLI(rd, rs1, imm));
        18: p.push_back(SRAI(rd, rs1, imm));
        19: p.push_back(LUI(rd, 20'($urandom)));
        20: p.push_back(SW(rs2, 5'd29, 4 * int'($urandom_range(0, 15))));
        21: p.push_back(LW(rd, 5'd29, 4 * int'($urandom_range(0, 15))));
        22, 23: begin                         // forward branch over one instruction
          logic [2:0] f3;
          case ($urandom_range(0, 5))
            0: f3 = 3'd0; 1: f3 = 3'd1; 2: f3 = 3'd4; 3: f3 = 3'd5; 4: f3 = 3'd6; default: f3 = 3'd7;
          endcase
          p.push_back(enc_b(f3, rs1, rs2, 8));
          p.push_back(ADDI(rd, rd, imm));
        end
        24: begin                             // jump over one instruction
          p.push_back(JAL(rd, 8));
          p.push_back(ADDI(rd, rd, imm));
        end
        default: p.push_back(MUL(rd, rs1, rs2));
      endcase
    end
    emit_epilogue(p);
  endfunction

endpackage
