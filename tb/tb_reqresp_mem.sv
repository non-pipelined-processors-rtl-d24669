// tb_reqresp_mem: self-checking testbench of the request/response memory.
// Two instances (latency 1 and 4) get the same random stream of loads and
// stores; each load's response must carry the shadow-array value and arrive
// exactly LATENCY cycles after the request, stores must give no response,
// a response must wait until taken, and a new request may be sent in the
// cycle a response is taken. The host port is checked for direct access.
module tb_reqresp_mem;
  import rv_pkg::*;

  localparam int WORDS = 128;
  localparam int LAT [2] = '{1, 4};

  logic clk = 1'b0, rst = 1'b1;
  logic req_valid [2], req_ready [2], resp_valid [2], resp_deq [2];
  mem_req_t req [2];
  word_t resp_data [2], host_rdata [2];
  logic host_we = 1'b0;
  word_t host_addr = '0, host_wdata = '0;
  int checks = 0, failures = 0, back_to_back = 0, held = 0;

  always #5 clk = ~clk;

  for (genvar i = 0; i < 2; i++) begin : g_dut
    reqresp_mem #(.WORDS(WORDS), .LATENCY(LAT[i])) dut (
      .clk(clk), .rst(rst),
      .req_valid(req_valid[i]), .req_ready(req_ready[i]), .req(req[i]),
      .resp_valid(resp_valid[i]), .resp_data(resp_data[i]), .resp_deq(resp_deq[i]),
      .host_we(host_we), .host_addr(host_addr), .host_wdata(host_wdata),
      .host_rdata(host_rdata[i])
    );
  end

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

  // One driver per instance: random loads/stores, checks data and latency.
  task automatic drive(input int i);
    word_t shadow [WORDS];
    for (int w = 0; w < WORDS; w++) shadow[w] = word_t'(w) ^ 32'h5a5a_0000;
    repeat (1500) begin
      int idx = $urandom_range(0, WORDS - 1);
      bit st  = ($urandom_range(0, 2) == 0);
      word_t dat = $urandom;
      int wait_cycles;
      check(req_ready[i], $sformatf("m%0d not ready when idle", i));
      req_valid[i] = 1'b1;
      req[i] = '{op: st ? MEM_ST : MEM_LD, addr: word_t'(4*idx), data: dat};
      @(posedge clk); #1;
      req_valid[i] = 1'b0;
      if (st) begin
        shadow[idx] = dat;
        check(!resp_valid[i], $sformatf("m%0d response to a store", i));
      end else begin
        wait_cycles = 1;
        while (!resp_valid[i] && wait_cycles < 20) begin @(posedge clk); #1; wait_cycles++; end
        check(wait_cycles == LAT[i], $sformatf("m%0d latency %0d exp %0d", i, wait_cycles, LAT[i]));
        check(resp_data[i] == shadow[idx], $sformatf("m%0d load [%0d]=%h exp %h", i, idx, resp_data[i], shadow[idx]));
        // sometimes hold the response a few cycles
        if ($urandom_range(0, 3) == 0) begin
          repeat ($urandom_range(1, 3)) begin @(posedge clk); #1; end
          check(resp_valid[i] && resp_data[i] == shadow[idx], $sformatf("m%0d response not held", i));
          held++;
        end
        resp_deq[i] = 1'b1;
        // sometimes send the next request in the same cycle
        if ($urandom_range(0, 1) == 0) begin
          int idx2 = $urandom_range(0, WORDS - 1);
          check(req_ready[i], $sformatf("m%0d not ready while a response is taken", i));
          req_valid[i] = 1'b1;
          req[i] = '{op: MEM_LD, addr: word_t'(4*idx2), data: '0};
          @(posedge clk); #1;
          resp_deq[i] = 1'b0; req_valid[i] = 1'b0;
          wait_cycles = 1;
          while (!resp_valid[i] && wait_cycles < 20) begin @(posedge clk); #1; wait_cycles++; end
          check(wait_cycles == LAT[i], $sformatf("m%0d back-to-back latency %0d", i, wait_cycles));
          check(resp_data[i] == shadow[idx2], $sformatf("m%0d back-to-back data", i));
          back_to_back++;
          resp_deq[i] = 1'b1;
        end
        @(posedge clk); #1;
        resp_deq[i] = 1'b0;
        check(!resp_valid[i], $sformatf("m%0d response not removed", i));
      end
    end
  endtask

  initial begin
    for (int i = 0; i < 2; i++) begin req_valid[i] = 0; resp_deq[i] = 0; req[i] = '0; end
    // host port preload
    host_we = 1'b1;
    for (int w = 0; w < WORDS; w++) begin
      host_addr = word_t'(4*w); host_wdata = word_t'(w) ^ 32'h5a5a_0000;
      @(posedge clk); #1;
    end
    host_we = 1'b0;
    host_addr = 32'd12; #1;
    check(host_rdata[0] == (32'd3 ^ 32'h5a5a_0000) && host_rdata[1] == host_rdata[0], "host read");
    rst = 1'b0;
    @(posedge clk); #1;
    fork
      drive(0);
      drive(1);
    join
    check(back_to_back > 0 && held > 0, "back-to-back and held responses exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
