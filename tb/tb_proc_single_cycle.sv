// tb_proc_single_cycle: self-checking testbench of the single-cycle processor.
//
// Loads programs through the host port (into both the instruction and the
// data memory), runs each to its tohost store and compares with the
// reference model of rv_tb_pkg: exit code, retired-instruction count, the
// register dump and the data region. The processor must retire exactly one
// instruction per cycle, so the cycle count must equal the instruction
// count. Programs: a directed one using every supported instruction, several
// random ones, one with MUL (unsupported here) and one with AUIPC, both of
// which must halt with illegal set, bad_pc/bad_inst naming the instruction,
// and nothing after it executed.
module tb_proc_single_cycle;
  import rv_tb_pkg::*;

  localparam int WORDS = 4096;
  localparam word_t TOHOST = 32'h0000_3FFC;

  logic clk = 1'b0, rst = 1'b1;
  logic host_en = 1'b0, host_we = 1'b0;
  word_t host_addr = '0, host_wdata = '0, host_rdata;
  logic  halted, illegal;
  word_t exit_code, bad_pc, bad_inst, pc, instret;
  int    cycles;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  proc_single_cycle #(.MEM_WORDS(WORDS), .TOHOST_ADDR(TOHOST)) dut (
    .clk(clk), .rst(rst),
    .host_en(host_en), .host_we(host_we), .host_addr(host_addr),
    .host_wdata(host_wdata), .host_rdata(host_rdata),
    .halted(halted), .illegal(illegal), .exit_code(exit_code),
    .bad_pc(bad_pc), .bad_inst(bad_inst), .pc_out(pc), .instret(instret)
  );

  always_ff @(posedge clk) if (!rst && !host_en && !halted) cycles <= cycles + 1;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic run_program(input word_t prog[$], input string name);
    rv_iss iss = new(TOHOST, WORDS, 1'b0);
    rst = 1'b1; host_en = 1'b1;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    cycles = 0;
    for (int w = 0; w < WORDS; w++) begin
      host_we = 1'b1; host_addr = word_t'(4*w);
      host_wdata = (w < prog.size()) ? prog[w] : '0;
      @(posedge clk); #1;
    end
    host_we = 1'b0;
    foreach (prog[w]) iss.mem[w] = prog[w];
    iss.run(200000);
    host_en = 1'b0;
    wait (halted);
    repeat (2) @(posedge clk);
    #1 host_en = 1'b1;
    check(illegal == iss.illegal, $sformatf("%s illegal=%0d", name, illegal));
    check(instret == word_t'(iss.total), $sformatf("%s instret %0d exp %0d", name, instret, iss.total));
    // one cycle per instruction, plus the cycle in which a bad one halts
    check(cycles == iss.total + int'(iss.illegal),
          $sformatf("%s cycles %0d exp %0d (one per instruction)", name, cycles, iss.total + int'(iss.illegal)));
    if (iss.illegal) begin
      check(bad_pc == iss.pc, $sformatf("%s bad_pc %h exp %h", name, bad_pc, iss.pc));
      check(bad_inst == iss.rd_mem(iss.pc), $sformatf("%s bad_inst %h", name, bad_inst));
      check(pc == iss.pc, $sformatf("%s pc moved past the bad instruction", name));
    end else begin
      check(exit_code == iss.exit_code, $sformatf("%s exit code", name));
    end
    for (int w = 0; w < 32; w++) begin
      word_t a = DUMP_BASE + word_t'(4*w);
      host_addr = a; #1;
      check(host_rdata == iss.rd_mem(a), $sformatf("%s mem[%h]=%h exp %h", name, a, host_rdata, iss.rd_mem(a)));
    end
    for (int w = -2; w < 16; w++) begin
      word_t a = DATA_BASE + word_t'(4*w);
      host_addr = a; #1;
      check(host_rdata == iss.rd_mem(a), $sformatf("%s mem[%h]=%h exp %h", name, a, host_rdata, iss.rd_mem(a)));
    end
    $display("%s: %0d instructions in %0d cycles", name, iss.total, cycles);
  endtask

  initial begin
    word_t prog[$];
    build_directed(prog, 1'b0);
    run_program(prog, "directed");
    for (int r = 0; r < 4; r++) begin
      build_random(prog, 120, 1'b0);
      run_program(prog, $sformatf("random%0d", r));
    end
    prog.delete();
    prog.push_back(ADDI(5'd1, 5'd0, 7));
    prog.push_back(SW(5'd1, 5'd0, 12'h780 + 4));
    prog.push_back(MUL(5'd2, 5'd1, 5'd1));   // not supported by this processor
    prog.push_back(SW(5'd1, 5'd0, 12'h780 + 8));
    run_program(prog, "illegal_mul");
    prog.delete();
    prog.push_back(ADDI(5'd1, 5'd0, 9));
    prog.push_back(32'h0000_1097);           // AUIPC x1, 1
    run_program(prog, "illegal_auipc");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
