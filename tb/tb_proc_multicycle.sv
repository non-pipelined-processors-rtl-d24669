// tb_proc_multicycle: self-checking testbench of the multicycle processor.
//
// Three processors run the same programs side by side: the default one
// (memory latency 1, no early fetch), one with early fetch, and one with
// early fetch and a memory latency of 3. Each program is loaded through the
// host port, run to its tohost store, and checked against the reference
// model of rv_tb_pkg: exit code, retired-instruction count, the register dump
// and the data region in memory, and the exact cycle count worked out from
// the instruction mix (FETCH/EXECUTE/LOADWAIT/MCWAIT costs). Programs: a
// directed one using every instruction including MUL, several random ones,
// and one ending in an unsupported instruction, which must halt with illegal
// set. The FSM states visited are counted; each must occur.
module tb_proc_multicycle;
  import rv_tb_pkg::*;

  localparam int NDUT = 3;
  localparam int WORDS = 4096;
  localparam word_t TOHOST = 32'h0000_3FFC;
  localparam int LAT   [NDUT] = '{1, 1, 3};
  localparam bit EARLY [NDUT] = '{1'b0, 1'b1, 1'b1};

  logic clk = 1'b0, rst = 1'b1;
  logic host_en = 1'b0, host_we = 1'b0;
  word_t host_addr = '0, host_wdata = '0;
  word_t host_rdata [NDUT];
  logic  halted [NDUT], illegal [NDUT];
  word_t exit_code [NDUT], bad_pc [NDUT], bad_inst [NDUT], pc [NDUT], instret [NDUT];
  int    cycles [NDUT];
  int    n_loadwait [NDUT], n_mcwait [NDUT], n_fetch [NDUT];

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  for (genvar i = 0; i < NDUT; i++) begin : g_dut
    proc_multicycle #(
      .MEM_WORDS(WORDS), .MEM_LATENCY(LAT[i]), .EARLY_FETCH(EARLY[i]), .TOHOST_ADDR(TOHOST)
    ) dut (
      .clk(clk), .rst(rst),
      .host_en(host_en), .host_we(host_we), .host_addr(host_addr),
      .host_wdata(host_wdata), .host_rdata(host_rdata[i]),
      .halted(halted[i]), .illegal(illegal[i]), .exit_code(exit_code[i]),
      .bad_pc(bad_pc[i]), .bad_inst(bad_inst[i]), .pc_out(pc[i]), .instret(instret[i])
    );
    always_ff @(posedge clk) begin
      if (!rst && !host_en && !halted[i]) begin
        cycles[i] <= cycles[i] + 1;
        if (dut.state == dut.S_LOADWAIT && dut.lw_fire) n_loadwait[i] <= n_loadwait[i] + 1;
        if (dut.state == dut.S_MCWAIT && dut.mc_fire)   n_mcwait[i]   <= n_mcwait[i] + 1;
        if (dut.state == dut.S_FETCH)                   n_fetch[i]    <= n_fetch[i] + 1;
      end
    end
  end

  initial begin : watchdog
    repeat (400000) @(posedge clk);
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

  task automatic host_write(input word_t a, input word_t d);
    host_we = 1'b1; host_addr = a; host_wdata = d;
    @(posedge clk); #1;
    host_we = 1'b0;
  endtask

  task automatic run_program(input word_t prog[$], input string name);
    rv_iss iss = new(TOHOST, WORDS, 1'b1);
    int exp_cycles;
    rst = 1'b1; host_en = 1'b1;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int i = 0; i < NDUT; i++) cycles[i] = 0;
    for (int w = 0; w < WORDS; w++)
      host_write(word_t'(4*w), (w < prog.size()) ? prog[w] : '0);
    foreach (prog[w]) iss.mem[w] = prog[w];
    iss.run(200000);
    host_en = 1'b0;
    fork
      begin
        for (int i = 0; i < NDUT; i++) wait (halted[i]);
      end
    join
    repeat (2) @(posedge clk);
    #1 host_en = 1'b1;
    for (int i = 0; i < NDUT; i++) begin
      check(illegal[i] == iss.illegal, $sformatf("%s dut%0d illegal=%0d", name, i, illegal[i]));
      check(instret[i] == word_t'(iss.total),
            $sformatf("%s dut%0d instret %0d exp %0d", name, i, instret[i], iss.total));
      if (iss.illegal) begin
        check(bad_pc[i] == iss.pc, $sformatf("%s dut%0d bad_pc %h exp %h", name, i, bad_pc[i], iss.pc));
        check(bad_inst[i] == iss.rd_mem(iss.pc), $sformatf("%s dut%0d bad_inst", name, i));
      end else begin
        check(exit_code[i] == iss.exit_code, $sformatf("%s dut%0d exit code", name, i));
        // Without early fetch every instruction pays its own FETCH cycle.
        // With it, the first FETCH after reset replaces the FETCH that the
        // final (tohost) store no longer needs; both sum to the same total.
        exp_cycles = 0;
        for (int k = 0; k < int'(K_NKINDS); k++)
          exp_cycles += iss.count[k] * mc_cycles(kind_e'(k), LAT[i], 32, EARLY[i]);
        check(cycles[i] == exp_cycles,
              $sformatf("%s dut%0d cycles %0d exp %0d", name, i, cycles[i], exp_cycles));
      end
    end
    // memory: register dump and data region
    for (int w = 0; w < 32; w++) begin
      word_t a = DUMP_BASE + word_t'(4*w);
      host_addr = a; #1;
      for (int i = 0; i < NDUT; i++)
        check(host_rdata[i] == iss.rd_mem(a),
              $sformatf("%s dut%0d mem[%h]=%h exp %h", name, i, a, host_rdata[i], iss.rd_mem(a)));
    end
    for (int w = -2; w < 16; w++) begin
      word_t a = DATA_BASE + word_t'(4*w);
      host_addr = a; #1;
      for (int i = 0; i < NDUT; i++)
        check(host_rdata[i] == iss.rd_mem(a),
              $sformatf("%s dut%0d mem[%h]=%h exp %h", name, i, a, host_rdata[i], iss.rd_mem(a)));
    end
    $display("%s: %0d instructions, cycles %0d/%0d/%0d", name, iss.total, cycles[0], cycles[1], cycles[2]);
  endtask

  initial begin
    word_t prog[$];
    build_directed(prog, 1'b1);
    run_program(prog, "directed");
    for (int r = 0; r < 4; r++) begin
      build_random(prog, 120, 1'b1);
      run_program(prog, $sformatf("random%0d", r));
    end
    // unsupported instruction (AUIPC) after a few ALU ops
    prog.delete();
    prog.push_back(ADDI(5'd1, 5'd0, 7));
    prog.push_back(ADDI(5'd2, 5'd1, 7));
    prog.push_back(32'h0000_1097);   // AUIPC x1, 1
    prog.push_back(ADDI(5'd3, 5'd0, 9));
    run_program(prog, "illegal");
    for (int i = 0; i < NDUT; i++) begin
      check(n_loadwait[i] > 0, $sformatf("dut%0d never in LOADWAIT", i));
      check(n_mcwait[i] > 0,   $sformatf("dut%0d never in MCWAIT", i));
      check(n_fetch[i] > 0,    $sformatf("dut%0d never in FETCH", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
