// rfile_2r1w: register file with two read ports and one write port.
//
// NREGS registers of 32 bits, all reset to zero. Reads are combinational and
// may happen every cycle. A write (wr_en, wr_idx, wr_data) takes effect at the
// rising clock edge, so a read in the same cycle as a write to the same
// register returns the old value (reads are ordered before the write).
// Register 0 is hard-wired to zero: writes to it are dropped. All of this
// follows the described register file; the reset is synchronous and active
// high, as in the rest of this design.
module rfile_2r1w
  import rv_pkg::*;
#(
  parameter int unsigned NREGS = 32
) (
  input  logic   clk,
  input  logic   rst,
  input  rindx_t rd1_idx,
  output word_t  rd1_data,
  input  rindx_t rd2_idx,
  output word_t  rd2_data,
  input  logic   wr_en,
  input  rindx_t wr_idx,
  input  word_t  wr_data
);
  word_t rfile [NREGS];

  assign rd1_data = rfile[rd1_idx];
  assign rd2_data = rfile[rd2_idx];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NREGS; i++) rfile[i] <= '0;
    end else if (wr_en && wr_idx != '0) begin
      rfile[wr_idx] <= wr_data;
    end
  end
endmodule
