// nonpipelined_top: the two non-pipelined RISC-V processors side by side.
//
// The single-cycle processor (sc_*) and the multicycle processor with a
// request/response memory and a multicycle multiplier (mc_*) are independent
// designs built from the same components (decoder, register file, ALU,
// branch comparator, execute unit). Each has its own host port, through which a host computer loads the program and data and
// reads results, and its own status outputs. Neither processor has any other
// interface: after loading, the host drops host_en and the processor runs
// from pc = 0 until it stores to TOHOST_ADDR or meets an unsupported
// instruction. Both share clk and rst (synchronous, active high).
module nonpipelined_top
  import rv_pkg::*;
#(
  parameter int unsigned MEM_WORDS   = 4096,
  parameter int unsigned MEM_LATENCY = 1,
  parameter bit          EARLY_FETCH = 1'b0,
  parameter word_t       TOHOST_ADDR = 32'h0000_3FFC
) (
  input  logic  clk,
  input  logic  rst,
  // single-cycle processor
  input  logic  sc_host_en,
  input  logic  sc_host_we,
  input  word_t sc_host_addr,
  input  word_t sc_host_wdata,
  output word_t sc_host_rdata,
  output logic  sc_halted,
  output logic  sc_illegal,
  output word_t sc_exit_code,
  output word_t sc_bad_pc,
  output word_t sc_bad_inst,
  output word_t sc_pc,
  output word_t sc_instret,
  // multicycle processor
  input  logic  mc_host_en,
  input  logic  mc_host_we,
  input  word_t mc_host_addr,
  input  word_t mc_host_wdata,
  output word_t mc_host_rdata,
  output logic  mc_halted,
  output logic  mc_illegal,
  output word_t mc_exit_code,
  output word_t mc_bad_pc,
  output word_t mc_bad_inst,
  output word_t mc_pc,
  output word_t mc_instret
);
  proc_single_cycle #(
    .MEM_WORDS(MEM_WORDS), .TOHOST_ADDR(TOHOST_ADDR)
  ) u_sc (
    .clk(clk), .rst(rst),
    .host_en(sc_host_en), .host_we(sc_host_we), .host_addr(sc_host_addr),
    .host_wdata(sc_host_wdata), .host_rdata(sc_host_rdata),
    .halted(sc_halted), .illegal(sc_illegal), .exit_code(sc_exit_code),
    .bad_pc(sc_bad_pc), .bad_inst(sc_bad_inst), .pc_out(sc_pc), .instret(sc_instret)
  );

  proc_multicycle #(
    .MEM_WORDS(MEM_WORDS), .MEM_LATENCY(MEM_LATENCY),
    .EARLY_FETCH(EARLY_FETCH), .TOHOST_ADDR(TOHOST_ADDR)
  ) u_mc (
    .clk(clk), .rst(rst),
    .host_en(mc_host_en), .host_we(mc_host_we), .host_addr(mc_host_addr),
    .host_wdata(mc_host_wdata), .host_rdata(mc_host_rdata),
    .halted(mc_halted), .illegal(mc_illegal), .exit_code(mc_exit_code),
    .bad_pc(mc_bad_pc), .bad_inst(mc_bad_inst), .pc_out(mc_pc), .instret(mc_instret)
  );
endmodule
