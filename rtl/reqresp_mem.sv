// reqresp_mem: memory with a request/response interface and a fixed latency.
//
// Unlike the magic memory, a read is split in two: a request (req_valid with
// req, accepted when req_ready) and, LATENCY cycles later, a response
// (resp_valid with resp_data) that stays until the user takes it with
// resp_deq. A store request is written at the clock edge that accepts it and
// produces no response. One request is outstanding at a time: req_ready is
// high when nothing is pending or when the pending response is valid; a
// request accepted while a response is waiting must take that response in
// the same cycle (resp_deq), which is the case in a processor that issues the
// next fetch in the cycle it consumes a response. Checked by an assertion.
//
// The host port (host_we, host_addr, host_wdata, host_rdata) reaches the array
// directly, without latency, so a host can load a program and read results.
//
// The request/response split follows the described memory interface; the
// fixed latency, the single outstanding request, the storeless response and
// the host port are this design's choices. Addresses are byte addresses,
// word aligned; addr[AW+1:2] selects the word.
module reqresp_mem
  import rv_pkg::*;
#(
  parameter int unsigned WORDS   = 4096,
  parameter int unsigned LATENCY = 1
) (
  input  logic     clk,
  input  logic     rst,
  // request
  input  logic     req_valid,
  output logic     req_ready,
  input  mem_req_t req,
  // response
  output logic     resp_valid,
  output word_t    resp_data,
  input  logic     resp_deq,
  // host
  input  logic     host_we,
  input  word_t    host_addr,
  input  word_t    host_wdata,
  output word_t    host_rdata
);
  localparam int unsigned AW = $clog2(WORDS);
  localparam int unsigned CW = (LATENCY > 1) ? $clog2(LATENCY) : 1;

  word_t mem [WORDS];
  logic          pending;
  logic [CW-1:0] cnt;
  word_t         data_q;
  logic [AW-1:0] ridx, hidx;
  logic          req_fire;

  assign ridx       = req.addr[AW+1:2];
  assign hidx       = host_addr[AW+1:2];
  assign host_rdata = mem[hidx];

  assign resp_valid = pending && (cnt == '0);
  assign resp_data  = data_q;
  assign req_ready  = !pending || resp_valid;
  assign req_fire   = req_valid && req_ready;

  always_ff @(posedge clk) begin
    if (host_we) mem[hidx] <= host_wdata;
    else if (req_fire && req.op == MEM_ST) mem[ridx] <= req.data;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      pending <= 1'b0;
      cnt     <= '0;
      data_q  <= '0;
    end else begin
      if (req_fire && req.op == MEM_LD) begin
        pending <= 1'b1;
        cnt     <= CW'(LATENCY - 1);
        data_q  <= mem[ridx];
      end else if (resp_valid && resp_deq) begin
        pending <= 1'b0;
      end else if (pending && cnt != '0) begin
        cnt <= cnt - 1'b1;
      end
    end
  end

  // Handshake rules.
  a_deq_valid : assert property (@(posedge clk) disable iff (rst) resp_deq |-> resp_valid)
    else $error("reqresp_mem: response taken while none is valid");
  a_no_drop : assert property (@(posedge clk) disable iff (rst) (req_fire && pending) |-> resp_deq)
    else $error("reqresp_mem: request accepted over an unread response");
  if (LATENCY < 1) begin : g_bad_latency
    $error("reqresp_mem: LATENCY must be at least 1");
  end
endmodule
