// proc_single_cycle: single-cycle, non-pipelined RV32I-subset processor.
//
// Every clock cycle that the processor runs, one instruction goes all the
// way: the instruction at pc is read from the instruction memory, decoded,
// its registers are read, it is executed, a load or store accesses the data
// memory, and at the clock edge the register file and pc are updated. Both
// memories are magic: combinational read, write at the clock edge. The clock
// period therefore has to cover imem + decode + register read + ALU + dmem +
// write-back. One instruction retires per cycle.
//
// Start and stop: after reset the pc is 0. A program ends by storing to
// TOHOST_ADDR; the store is performed, halted goes high and exit_code holds
// the stored word (0 by convention means success). An unsupported or illegal
// instruction also halts the processor, with illegal high and bad_pc /
// bad_inst naming it; no state is changed by it.
//
// Host port: while host_en is high the processor does not advance and the
// host owns both memory ports. A host write (host_we) goes to the instruction
// and the data memory alike, so both hold the same program-and-data image;
// host_rdata reads the data memory combinationally. The split into separate
// instruction and data memories, the host port, the halt outputs and
// TOHOST_ADDR are this design's choices; the datapath follows the described
// execute and update steps.
module proc_single_cycle
  import rv_pkg::*;
#(
  parameter int unsigned MEM_WORDS   = 4096,
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
  word_t  pc, inst, rval1, rval2, dmem_rdata, wb_data;
  dinst_t dinst;
  einst_t einst;
  logic   run;
  mem_req_t imem_req, dmem_req;
  logic   imem_en, dmem_en;

  assign run = !host_en && !halted && (dinst.itype != IT_UNSUPPORTED);

  // ---- instruction fetch ----
  always_comb begin
    if (host_en) begin
      imem_req = '{op: host_we ? MEM_ST : MEM_LD, addr: host_addr, data: host_wdata};
      imem_en  = host_we;
    end else begin
      imem_req = '{op: MEM_LD, addr: pc, data: DWV};
      imem_en  = 1'b0;
    end
  end

  magic_mem #(.WORDS(MEM_WORDS)) u_imem (
    .clk(clk), .en(imem_en), .req(imem_req), .rdata(inst)
  );

  // ---- decode, register read, execute ----
  decoder #(.EN_MUL(1'b0)) u_dec (.inst(inst), .dinst(dinst));

  rfile_2r1w u_rf (
    .clk(clk), .rst(rst),
    .rd1_idx(dinst.src1), .rd1_data(rval1),
    .rd2_idx(dinst.src2), .rd2_data(rval2),
    .wr_en(run && einst.dst.valid), .wr_idx(einst.dst.idx), .wr_data(wb_data)
  );

  exec_unit u_exec (
    .dinst(dinst), .rval1(rval1), .rval2(rval2), .pc(pc), .einst(einst)
  );

  // ---- data memory ----
  always_comb begin
    if (host_en) begin
      dmem_req = '{op: host_we ? MEM_ST : MEM_LD, addr: host_addr, data: host_wdata};
      dmem_en  = host_we;
    end else begin
      dmem_req = '{op: (einst.itype == IT_STORE) ? MEM_ST : MEM_LD,
                   addr: einst.addr, data: einst.data};
      dmem_en  = run && (einst.itype == IT_STORE);
    end
  end

  magic_mem #(.WORDS(MEM_WORDS)) u_dmem (
    .clk(clk), .en(dmem_en), .req(dmem_req), .rdata(dmem_rdata)
  );

  assign host_rdata = dmem_rdata;
  assign wb_data    = (einst.itype == IT_LOAD) ? dmem_rdata : einst.data;

  // ---- state update ----
  always_ff @(posedge clk) begin
    if (rst) begin
      pc        <= '0;
      halted    <= 1'b0;
      illegal   <= 1'b0;
      exit_code <= '0;
      bad_pc    <= '0;
      bad_inst  <= '0;
      instret   <= '0;
    end else if (!host_en && !halted) begin
      if (dinst.itype == IT_UNSUPPORTED) begin
        halted   <= 1'b1;
        illegal  <= 1'b1;
        bad_pc   <= pc;
        bad_inst <= inst;
      end else begin
        pc      <= einst.next_pc;
        instret <= instret + 1;
        if (einst.itype == IT_STORE && einst.addr == TOHOST_ADDR) begin
          halted    <= 1'b1;
          exit_code <= einst.data;
        end
      end
    end
  end

  assign pc_out = pc;
endmodule
