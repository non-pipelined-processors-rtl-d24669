// tb_top_full_size: the top with every parameter at its default, taken
// through complete programs: host load of the full 4096-word memories, a
// directed program on both processors (MUL on the multicycle one), a random
// program, and an unsupported instruction. Results, instruction counts and
// cycle counts are checked against the reference model of rv_tb_pkg, and
// each mechanism (host load, tohost halt, illegal halt, FETCH, LOADWAIT,
// MCWAIT, taken and untaken branches) must have happened.
module tb_top_full_size;
  import rv_tb_pkg::*;

  localparam int NTOP  = 1;
  localparam int WORDS = 4096;                     // default MEM_WORDS
  localparam word_t TOHOST = 32'h0000_3FFC;        // default TOHOST_ADDR
  localparam int LAT   [2] = '{1, 2};
  localparam bit EARLY [2] = '{1'b0, 1'b1};

  logic clk = 1'b0, rst = 1'b1;
  logic host_en = 1'b0, sc_we = 1'b0, mc_we = 1'b0;
  word_t host_addr = '0, sc_wdata = '0, mc_wdata = '0;
  word_t sc_rdata [NTOP], mc_rdata [NTOP];
  logic  sc_halted [NTOP], sc_illegal [NTOP], mc_halted [NTOP], mc_illegal [NTOP];
  word_t sc_exit [NTOP], sc_bad_pc [NTOP], sc_bad_inst [NTOP], sc_pc [NTOP], sc_instret [NTOP];
  word_t mc_exit [NTOP], mc_bad_pc [NTOP], mc_bad_inst [NTOP], mc_pc [NTOP], mc_instret [NTOP];
  int    sc_cycles [NTOP], mc_cycles_run [NTOP];
  int    n_fetch [NTOP], n_loadwait [NTOP], n_mcwait [NTOP], n_early [NTOP];
  int    n_taken = 0, n_untaken = 0, n_host_words = 0, n_tohost = 0, n_illegal = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  for (genvar i = 0; i < NTOP; i++) begin : g_top
    if (i == 0) begin : g_default
      nonpipelined_top dut (
        .clk, .rst,
        .sc_host_en(host_en), .sc_host_we(sc_we), .sc_host_addr(host_addr),
        .sc_host_wdata(sc_wdata), .sc_host_rdata(sc_rdata[i]),
        .sc_halted(sc_halted[i]), .sc_illegal(sc_illegal[i]), .sc_exit_code(sc_exit[i]),
        .sc_bad_pc(sc_bad_pc[i]), .sc_bad_inst(sc_bad_inst[i]), .sc_pc(sc_pc[i]), .sc_instret(sc_instret[i]),
        .mc_host_en(host_en), .mc_host_we(mc_we), .mc_host_addr(host_addr),
        .mc_host_wdata(mc_wdata), .mc_host_rdata(mc_rdata[i]),
        .mc_halted(mc_halted[i]), .mc_illegal(mc_illegal[i]), .mc_exit_code(mc_exit[i]),
        .mc_bad_pc(mc_bad_pc[i]), .mc_bad_inst(mc_bad_inst[i]), .mc_pc(mc_pc[i]), .mc_instret(mc_instret[i])
      );
    end
  end

  // Cycle and mechanism counters (the multicycle state is observed through
  // its fire conditions; the processor's ports do not show it).
  for (genvar i = 0; i < NTOP; i++) begin : g_count
    logic in_fetch, lw_done, mc_done, early;
    if (i == 0) begin : g_d
      assign in_fetch = g_top[i].g_default.dut.u_mc.state == 3'd0;
      assign lw_done  = g_top[i].g_default.dut.u_mc.lw_fire;
      assign mc_done  = g_top[i].g_default.dut.u_mc.mc_fire;
      assign early    = 1'b0;
    end
    always_ff @(posedge clk) begin
      if (!rst && !host_en) begin
        if (!sc_halted[i]) sc_cycles[i] <= sc_cycles[i] + 1;
        if (!mc_halted[i]) begin
          mc_cycles_run[i] <= mc_cycles_run[i] + 1;
          if (in_fetch) n_fetch[i]    <= n_fetch[i] + 1;
          if (lw_done)  n_loadwait[i] <= n_loadwait[i] + 1;
          if (mc_done)  n_mcwait[i]   <= n_mcwait[i] + 1;
          if (early) n_early[i] <= n_early[i] + 1;
        end
      end
    end
  end

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic compare_mem(input rv_iss iss, input bit mc, input string name);
    word_t a;
    for (int w = 0; w < 50; w++) begin
      a = (w < 32) ? DUMP_BASE + word_t'(4*w) : DATA_BASE + word_t'(4*(w - 34));
      host_addr = a; #1;
      for (int i = 0; i < NTOP; i++) begin
        word_t got = mc ? mc_rdata[i] : sc_rdata[i];
        check(got == iss.rd_mem(a), $sformatf("%s top%0d %s mem[%h]=%h exp %h",
              name, i, mc ? "mc" : "sc", a, got, iss.rd_mem(a)));
      end
    end
  endtask

  // The same image goes to both processors; MUL only runs on the multicycle
  // one, so sc_prog and mc_prog may differ.
  task automatic run_programs(input word_t sc_prog[$], input word_t mc_prog[$], input string name);
    rv_iss sc_iss = new(TOHOST, WORDS, 1'b0);
    rv_iss mc_iss = new(TOHOST, WORDS, 1'b1);
    int exp_cyc;
    rst = 1'b1; host_en = 1'b1;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int i = 0; i < NTOP; i++) begin sc_cycles[i] = 0; mc_cycles_run[i] = 0; end
    // The host writes both images, word by word, through the two host ports.
    foreach (sc_prog[w]) sc_iss.mem[w] = sc_prog[w];
    foreach (mc_prog[w]) mc_iss.mem[w] = mc_prog[w];
    for (int w = 0; w < WORDS; w++) begin
      sc_we = 1'b1; mc_we = 1'b1; host_addr = word_t'(4*w);
      sc_wdata = (w < sc_prog.size()) ? sc_prog[w] : '0;
      mc_wdata = (w < mc_prog.size()) ? mc_prog[w] : '0;
      @(posedge clk); #1;
      n_host_words++;
    end
    sc_we = 1'b0; mc_we = 1'b0;
    sc_iss.run(400000);
    mc_iss.run(400000);
    host_en = 1'b0;
    for (int i = 0; i < NTOP; i++) begin
      wait (sc_halted[i]);
      wait (mc_halted[i]);
    end
    repeat (2) @(posedge clk);
    #1 host_en = 1'b1;
    for (int i = 0; i < NTOP; i++) begin
      check(sc_illegal[i] == sc_iss.illegal && mc_illegal[i] == mc_iss.illegal,
            $sformatf("%s top%0d illegal flags", name, i));
      check(sc_instret[i] == word_t'(sc_iss.total), $sformatf("%s top%0d sc instret", name, i));
      check(mc_instret[i] == word_t'(mc_iss.total), $sformatf("%s top%0d mc instret", name, i));
      check(sc_cycles[i] == sc_iss.total + int'(sc_iss.illegal),
            $sformatf("%s top%0d sc cycles %0d exp %0d", name, i, sc_cycles[i], sc_iss.total));
      if (sc_iss.illegal) begin
        check(sc_bad_pc[i] == sc_iss.pc, $sformatf("%s top%0d sc bad_pc", name, i));
        n_illegal++;
      end else begin
        check(sc_exit[i] == sc_iss.exit_code, $sformatf("%s top%0d sc exit", name, i));
        n_tohost++;
      end
      if (mc_iss.illegal) begin
        check(mc_bad_pc[i] == mc_iss.pc && mc_bad_inst[i] == mc_iss.rd_mem(mc_iss.pc),
              $sformatf("%s top%0d mc bad_pc", name, i));
        n_illegal++;
      end else begin
        check(mc_exit[i] == mc_iss.exit_code, $sformatf("%s top%0d mc exit", name, i));
        n_tohost++;
        exp_cyc = 0;
        for (int k = 0; k < int'(K_NKINDS); k++)
          exp_cyc += mc_iss.count[k] * mc_cycles(kind_e'(k), LAT[i], 32, EARLY[i]);
        check(mc_cycles_run[i] == exp_cyc,
              $sformatf("%s top%0d mc cycles %0d exp %0d", name, i, mc_cycles_run[i], exp_cyc));
      end
    end
    compare_mem(sc_iss, 1'b0, name);
    compare_mem(mc_iss, 1'b1, name);
    $display("%s: single-cycle %0d instr / %0d cycles; multicycle %0d instr / %0d cycles (top0)",
             name, sc_iss.total, sc_cycles[0], mc_iss.total, mc_cycles_run[0]);
  endtask

  // Branch outcomes seen by the single-cycle processor of top 0.
  always_ff @(posedge clk) begin
    if (!rst && !host_en && !sc_halted[0]
        && g_top[0].g_default.dut.u_sc.dinst.itype == rv_pkg::IT_BRANCH) begin
      if (g_top[0].g_default.dut.u_sc.einst.next_pc != sc_pc[0] + 4) n_taken++;
      else n_untaken++;
    end
  end

  initial begin
    word_t sc_prog[$], mc_prog[$];
    build_directed(sc_prog, 1'b0);
    build_directed(mc_prog, 1'b1);
    run_programs(sc_prog, mc_prog, "directed");
    for (int r = 0; r < 1; r++) begin
      build_random(sc_prog, 120, 1'b0);
      build_random(mc_prog, 120, 1'b1);
      run_programs(sc_prog, mc_prog, $sformatf("random%0d", r));
    end
    sc_prog.delete();
    sc_prog.push_back(ADDI(5'd1, 5'd0, 5));
    sc_prog.push_back(32'h0000_1097);       // AUIPC: unsupported
    mc_prog = sc_prog;
    run_programs(sc_prog, mc_prog, "illegal");
    // mechanisms
    check(n_host_words > 0, "host load never happened");
    check(n_tohost > 0,     "tohost halt never happened");
    check(n_illegal > 0,    "illegal-instruction halt never happened");
    check(n_taken > 0,      "no taken branch");
    check(n_untaken > 0,    "no untaken branch");
    for (int i = 0; i < NTOP; i++) begin
      check(n_fetch[i] > 0,    $sformatf("top%0d: FETCH never happened", i));
      check(n_loadwait[i] > 0, $sformatf("top%0d: LOADWAIT never happened", i));
      check(n_mcwait[i] > 0,   $sformatf("top%0d: MCWAIT never happened", i));
      if (EARLY[i]) check(n_early[i] > 0, $sformatf("top%0d: early fetch never happened", i));
    end
    $display("mechanisms: host words %0d, tohost halts %0d, illegal halts %0d, branches taken %0d / untaken %0d",
             n_host_words, n_tohost, n_illegal, n_taken, n_untaken);
    for (int i = 0; i < NTOP; i++)
      $display("top%0d: FETCH %0d, LOADWAIT %0d, MCWAIT %0d, early fetches %0d",
               i, n_fetch[i], n_loadwait[i], n_mcwait[i], n_early[i]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
