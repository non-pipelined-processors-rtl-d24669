// tb_mc_mul: self-checking testbench of the multicycle multiplier. Random and
// corner operand pairs; the response must equal the low 32 bits of the
// product, arrive exactly WIDTH (32) cycles after the request was accepted,
// stay until taken, and no new request may be accepted while busy.
module tb_mc_mul;
  localparam int W = 32;
  logic clk = 1'b0, rst = 1'b1;
  logic req_valid = 1'b0, req_ready, resp_valid, resp_deq = 1'b0;
  logic [W-1:0] a, b, product;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mc_mul #(.WIDTH(W)) dut (.*);

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic mul(input logic [W-1:0] x, input logic [W-1:0] y);
    longint unsigned full = longint'(x) * longint'(y);
    int n = 0;
    check(req_ready, "not ready when idle");
    a = x; b = y; req_valid = 1'b1;
    @(posedge clk); #1;
    req_valid = 1'b0;
    a = $urandom; b = $urandom;            // operands must have been captured
    while (!resp_valid && n < 100) begin
      check(!req_ready, "ready while busy");
      @(posedge clk); #1; n++;
    end
    check(n == W, $sformatf("latency %0d exp %0d", n, W));
    check(product == full[W-1:0], $sformatf("%h * %h = %h exp %h", x, y, product, full[W-1:0]));
    repeat ($urandom_range(0, 2)) begin @(posedge clk); #1; end
    check(resp_valid && product == full[W-1:0], "response not held");
    resp_deq = 1'b1;
    @(posedge clk); #1;
    resp_deq = 1'b0;
    check(!resp_valid && req_ready, "not idle after the response was taken");
  endtask

  initial begin
    a = '0; b = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    mul(0, 0); mul(1, 1); mul(32'hffff_ffff, 32'hffff_ffff); mul(32'h8000_0000, 2);
    mul(32'h1234_5678, 32'hffff_fffb); mul(7, 6);
    repeat (300) mul($urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
