// proc_multicycle: multicycle, non-pipelined RV32I-subset processor with a
// realistic (request/response) memory and a multicycle multiplier.
//
// An instruction is carried through a small state machine instead of one long
// combinational path, so the clock only has to cover the slowest single step:
//
//   FETCH   send a load request for the word at pc; go to EXECUTE.
//   EXECUTE wait for the instruction (memory response), decode it, read the
//           registers and execute it. Then one of:
//             - ALU op, LUI, JAL, JALR, branch: write rd, update pc, go to
//               FETCH;
//             - LW: send the load request, update pc, go to LOADWAIT;
//             - SW: send the store request, update pc, go to FETCH;
//             - MUL: send a request to the multiplier, go to MCWAIT.
//   LOADWAIT wait for the load data, write rd, go to FETCH.
//   MCWAIT  wait for the multiplier result, write rd, go to FETCH.
//
// Between states the partially executed instruction is kept in dst_q (the
// destination register); pc is already updated in EXECUTE. One memory serves
// instructions and data.
//
// EARLY_FETCH = 1 selects the cycle-saving variant: when EXECUTE (for a
// non-memory, non-multicycle instruction), LOADWAIT or MCWAIT finishes, it
// sends the fetch for the next pc itself and goes straight to EXECUTE,
// skipping the FETCH cycle. A store still goes through FETCH, because the
// single memory port is busy with the store that cycle. With the default
// memory latency of one cycle an instruction takes 2 (ALU/branch/jump,
// SW), 3 (LW) or 35 (MUL: 32 multiplier cycles plus one to hand over and one
// to write back) cycles without early fetch, and 1, 2, 2 and 34 with it.
//
// Start and stop, and the host port, are as in the single-cycle processor:
// pc starts at 0; a store to TOHOST_ADDR halts with exit_code = stored word;
// an unsupported instruction halts with illegal, bad_pc and bad_inst. While
// host_en is high the state machine holds still and the host reads/writes the
// memory directly. The states and their order follow the described
// processor; the multiplier as the multicycle unit (RISC-V MUL), the memory
// latency and the halt/host conventions are this design's choices.
module proc_multicycle
  import rv_pkg::*;
#(
  parameter int unsigned MEM_WORDS   = 4096,
  parameter int unsigned MEM_LATENCY = 1,
  parameter bit          EARLY_FETCH = 1'b0,
  parameter word_t       TOHOST_ADDR = 32'h0000_3FFC
) (
  input  logic  clk,
  input  logic  rst,
  // host access
  input  logic  host_en,
  input  logic  host_we,
  input  word_t host_addr,
  input  word_t host_wdata,
  output word_t host_rdata,
  // status
  output logic  halted,
  output logic  illegal,
  output word_t exit_code,
  output word_t bad_pc,
  output word_t bad_inst,
  output word_t pc_out,
  output word_t instret
);
  typedef enum logic [2:0] {S_FETCH, S_EXECUTE, S_LOADWAIT, S_MCWAIT, S_HALT} state_e;

  state_e   state;
  word_t    pc;
  maybe_rindx_t dst_q;

  // memory
  logic     mreq_valid, mreq_ready, mresp_valid, mresp_deq;
  mem_req_t mreq;
  word_t    mresp_data;

  // multiplier
  logic     mul_req_valid, mul_req_ready, mul_resp_valid, mul_resp_deq;
  word_t    mul_product;

  // decode / execute
  word_t    inst, rval1, rval2;
  dinst_t   dinst;
  einst_t   einst;

  // register write
  logic     rf_we;
  rindx_t   rf_widx;
  word_t    rf_wdata;

  logic     active, exec_fire, lw_fire, mc_fire;

  assign active = !host_en;
  assign inst   = mresp_data;

  decoder #(.EN_MUL(1'b1)) u_dec (.inst(inst), .dinst(dinst));

  rfile_2r1w u_rf (
    .clk(clk), .rst(rst),
    .rd1_idx(dinst.src1), .rd1_data(rval1),
    .rd2_idx(dinst.src2), .rd2_data(rval2),
    .wr_en(rf_we), .wr_idx(rf_widx), .wr_data(rf_wdata)
  );

  exec_unit u_exec (
    .dinst(dinst), .rval1(rval1), .rval2(rval2), .pc(pc), .einst(einst)
  );

  reqresp_mem #(.WORDS(MEM_WORDS), .LATENCY(MEM_LATENCY)) u_mem (
    .clk(clk), .rst(rst),
    .req_valid(mreq_valid), .req_ready(mreq_ready), .req(mreq),
    .resp_valid(mresp_valid), .resp_data(mresp_data), .resp_deq(mresp_deq),
    .host_we(host_en && host_we), .host_addr(host_addr),
    .host_wdata(host_wdata), .host_rdata(host_rdata)
  );

  mc_mul #(.WIDTH(32)) u_mul (
    .clk(clk), .rst(rst),
    .req_valid(mul_req_valid), .req_ready(mul_req_ready),
    .a(rval1), .b(rval2),
    .resp_valid(mul_resp_valid), .product(mul_product), .resp_deq(mul_resp_deq)
  );

  // An EXECUTE step fires when the instruction has arrived and the unit it
  // hands work to can take it.
  always_comb begin
    exec_fire = 1'b0;
    if (active && state == S_EXECUTE && mresp_valid) begin
      unique case (dinst.itype)
        IT_MUL:         exec_fire = mul_req_ready;
        IT_UNSUPPORTED: exec_fire = 1'b1;
        default:        exec_fire = mreq_ready;  // may send a load, store or fetch
      endcase
    end
  end
  assign lw_fire = active && state == S_LOADWAIT && mresp_valid && mreq_ready;
  assign mc_fire = active && state == S_MCWAIT && mul_resp_valid
                   && (!EARLY_FETCH || mreq_ready);

  // Memory requests, multiplier requests, response dequeue, register writes.
  always_comb begin
    mreq_valid    = 1'b0;
    mreq          = '{op: MEM_LD, addr: pc, data: DWV};
    mresp_deq     = 1'b0;
    mul_req_valid = 1'b0;
    mul_resp_deq  = 1'b0;
    rf_we         = 1'b0;
    rf_widx       = einst.dst.idx;
    rf_wdata      = einst.data;

    if (active) begin
      unique case (state)
        S_FETCH: mreq_valid = 1'b1;
        S_EXECUTE: if (exec_fire) begin
          mresp_deq = 1'b1;
          unique case (dinst.itype)
            IT_LOAD: begin
              mreq_valid = 1'b1;
              mreq       = '{op: MEM_LD, addr: einst.addr, data: DWV};
            end
            IT_STORE: begin
              mreq_valid = 1'b1;
              mreq       = '{op: MEM_ST, addr: einst.addr, data: einst.data};
            end
            IT_MUL: mul_req_valid = 1'b1;
            IT_UNSUPPORTED: ;
            default: begin
              rf_we = einst.dst.valid;
              if (EARLY_FETCH) begin
                mreq_valid = 1'b1;
                mreq       = '{op: MEM_LD, addr: einst.next_pc, data: DWV};
              end
            end
          endcase
        end
        S_LOADWAIT: if (lw_fire) begin
          mresp_deq = 1'b1;
          rf_we     = dst_q.valid;
          rf_widx   = dst_q.idx;
          rf_wdata  = mresp_data;
          mreq_valid = EARLY_FETCH;
        end
        S_MCWAIT: if (mc_fire) begin
          mul_resp_deq = 1'b1;
          rf_we        = dst_q.valid;
          rf_widx      = dst_q.idx;
          rf_wdata     = mul_product;
          mreq_valid   = EARLY_FETCH;
        end
        default: ;
      endcase
    end
  end

  // State machine.
  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_FETCH;
      pc        <= '0;
      dst_q     <= '0;
      halted    <= 1'b0;
      illegal   <= 1'b0;
      exit_code <= '0;
      bad_pc    <= '0;
      bad_inst  <= '0;
      instret   <= '0;
    end else if (active) begin
      unique case (state)
        S_FETCH: if (mreq_ready) state <= S_EXECUTE;
        S_EXECUTE: if (exec_fire) begin
          if (dinst.itype == IT_UNSUPPORTED) begin
            state    <= S_HALT;
            halted   <= 1'b1;
            illegal  <= 1'b1;
            bad_pc   <= pc;
            bad_inst <= inst;
          end else begin
            pc    <= einst.next_pc;
            dst_q <= einst.dst;
            unique case (dinst.itype)
              IT_LOAD: state <= S_LOADWAIT;
              IT_MUL:  state <= S_MCWAIT;
              IT_STORE: begin
                instret <= instret + 1;
                if (einst.addr == TOHOST_ADDR) begin
                  state     <= S_HALT;
                  halted    <= 1'b1;
                  exit_code <= einst.data;
                end else begin
                  state <= S_FETCH;
                end
              end
              default: begin
                instret <= instret + 1;
                state   <= EARLY_FETCH ? S_EXECUTE : S_FETCH;
              end
            endcase
          end
        end
        S_LOADWAIT: if (lw_fire) begin
          instret <= instret + 1;
          state   <= EARLY_FETCH ? S_EXECUTE : S_FETCH;
        end
        S_MCWAIT: if (mc_fire) begin
          instret <= instret + 1;
          state   <= EARLY_FETCH ? S_EXECUTE : S_FETCH;
        end
        default: ;  // S_HALT
      endcase
    end
  end

  assign pc_out = pc;

  // A memory response is only ever waited for in EXECUTE (instruction) or
  // LOADWAIT (load data); a multiplier result only in MCWAIT.
  a_mem_resp_state : assert property (@(posedge clk) disable iff (rst || host_en)
      mresp_valid |-> (state == S_EXECUTE || state == S_LOADWAIT))
    else $error("proc_multicycle: memory response outside EXECUTE/LOADWAIT");
  a_mul_resp_state : assert property (@(posedge clk) disable iff (rst || host_en)
      mul_resp_valid |-> state == S_MCWAIT)
    else $error("proc_multicycle: multiplier result outside MCWAIT");
endmodule
