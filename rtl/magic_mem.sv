// magic_mem: the "magic" single-port memory of the single-cycle processor.
//
// WORDS words of 32 bits, word-addressed by addr[AW+1:2] (byte addresses,
// word aligned; higher address bits are ignored). One port serves either a
// read or a write each cycle. A read (op = MEM_LD) is combinational: rdata
// shows mem[addr] in the same cycle. A write (en and op = MEM_ST) is done at
// the rising clock edge. This behaviour is the described memory model; the
// size, the word addressing and the separate en input are this design's
// choices. rdata is valid whatever en is, which is harmless for a read.
module magic_mem
  import rv_pkg::*;
#(
  parameter int unsigned WORDS = 1024
) (
  input  logic     clk,
  input  logic     en,
  input  mem_req_t req,
  output word_t    rdata
);
  localparam int unsigned AW = $clog2(WORDS);

  word_t mem [WORDS];
  logic [AW-1:0] widx;
  assign widx  = req.addr[AW+1:2];
  assign rdata = mem[widx];

  always_ff @(posedge clk) begin
    if (en && req.op == MEM_ST) mem[widx] <= req.data;
  end
endmodule
