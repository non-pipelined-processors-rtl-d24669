// tb_rfile_2r1w: self-checking testbench of the register file. Random reads
// and writes against a shadow array: both read ports, reset to zero, x0
// staying zero, and a read in the same cycle as a write to the same register
// returning the old value.
module tb_rfile_2r1w;
  import rv_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  rindx_t rd1_idx, rd2_idx, wr_idx;
  word_t  rd1_data, rd2_data, wr_data;
  logic   wr_en;
  word_t  shadow [32];
  int checks = 0, failures = 0, same_cycle = 0;

  always #5 clk = ~clk;

  rfile_2r1w dut (.*);

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
    wr_en = 0; wr_idx = 0; wr_data = 0; rd1_idx = 0; rd2_idx = 0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    foreach (shadow[i]) shadow[i] = '0;
    for (int i = 0; i < 32; i++) begin
      rd1_idx = rindx_t'(i); rd2_idx = rindx_t'(31 - i); #1;
      check(rd1_data == 0 && rd2_data == 0, $sformatf("x%0d not reset", i));
    end
    repeat (3000) begin
      wr_en   = ($urandom_range(0, 3) != 0);
      wr_idx  = rindx_t'($urandom);
      wr_data = $urandom;
      rd1_idx = ($urandom_range(0, 3) == 0) ? wr_idx : rindx_t'($urandom);
      rd2_idx = rindx_t'($urandom);
      #1;
      if (wr_en && rd1_idx == wr_idx) same_cycle++;
      check(rd1_data == shadow[rd1_idx], $sformatf("rd1 x%0d=%h exp %h", rd1_idx, rd1_data, shadow[rd1_idx]));
      check(rd2_data == shadow[rd2_idx], $sformatf("rd2 x%0d=%h exp %h", rd2_idx, rd2_data, shadow[rd2_idx]));
      @(posedge clk); #1;
      if (wr_en && wr_idx != 0) shadow[wr_idx] = wr_data;
    end
    rd1_idx = 0; wr_en = 1; wr_idx = 0; wr_data = 32'hdead_beef;
    @(posedge clk); #1;
    check(rd1_data == 0, "x0 was written");
    check(same_cycle > 0, "no same-cycle read/write exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
