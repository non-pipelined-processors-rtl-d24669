// tb_magic_mem: self-checking testbench of the magic memory. Random reads and
// writes against a shadow array: a read shows the stored word in the same
// cycle (combinational), a write lands at the clock edge and only when
// enabled, and a load request never writes.
module tb_magic_mem;
  import rv_pkg::*;

  localparam int WORDS = 256;
  logic clk = 1'b0, en;
  mem_req_t req;
  word_t rdata;
  word_t shadow [WORDS];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  magic_mem #(.WORDS(WORDS)) dut (.clk(clk), .en(en), .req(req), .rdata(rdata));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    en = 1'b1;
    for (int i = 0; i < WORDS; i++) begin
      req = '{op: MEM_ST, addr: word_t'(4*i), data: word_t'(i * 32'h01010101)};
      shadow[i] = word_t'(i * 32'h01010101);
      @(posedge clk); #1;
      check(rdata == shadow[i], $sformatf("write-then-read %0d", i));
    end
    repeat (3000) begin
      automatic int idx = $urandom_range(0, WORDS - 1);
      req.op   = mem_op_e'($urandom_range(0, 1));
      en       = ($urandom_range(0, 3) != 0);
      req.addr = word_t'(4 * idx);
      req.data = $urandom;
      #1;
      check(rdata == shadow[idx], $sformatf("read [%0d]=%h exp %h", idx, rdata, shadow[idx]));
      @(posedge clk); #1;
      if (en && req.op == MEM_ST) shadow[idx] = req.data;
      check(rdata == shadow[idx], $sformatf("after edge [%0d]=%h exp %h", idx, rdata, shadow[idx]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
