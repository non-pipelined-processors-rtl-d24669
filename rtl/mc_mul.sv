// mc_mul: multicycle multiplier with a request/response interface.
//
// A request (req_valid with a and b, accepted when req_ready) starts a
// shift-and-add multiplication that retires one multiplier bit per cycle.
// After WIDTH cycles the low WIDTH bits of a*b are offered as the response
// (resp_valid with product) until taken with resp_deq; only then is a new
// request accepted. The low half of the product is the same for signed and
// unsigned operands, so this serves RISC-V MUL. The request/response view of
// a multicycle functional unit follows the described design; the
// shift-and-add insides and the latency of WIDTH cycles are this design's
// choice of the simplest such unit.
module mc_mul #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             req_valid,
  output logic             req_ready,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic             resp_valid,
  output logic [WIDTH-1:0] product,
  input  logic             resp_deq
);
  localparam int unsigned CW = $clog2(WIDTH + 1);

  typedef enum logic [1:0] {IDLE, BUSY, DONE} state_e;
  state_e state;
  logic [WIDTH-1:0] acc, mcand, mplier;
  logic [CW-1:0]    cnt;

  assign req_ready  = (state == IDLE);
  assign resp_valid = (state == DONE);
  assign product    = acc;

  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= IDLE;
      acc    <= '0;
      mcand  <= '0;
      mplier <= '0;
      cnt    <= '0;
    end else begin
      unique case (state)
        IDLE: if (req_valid) begin
          acc    <= '0;
          mcand  <= a;
          mplier <= b;
          cnt    <= CW'(WIDTH);
          state  <= BUSY;
        end
        BUSY: begin
          if (mplier[0]) acc <= acc + mcand;
          mcand  <= mcand << 1;
          mplier <= mplier >> 1;
          cnt    <= cnt - 1'b1;
          if (cnt == CW'(1)) state <= DONE;
        end
        DONE: if (resp_deq) state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end

  a_deq_valid : assert property (@(posedge clk) disable iff (rst) resp_deq |-> resp_valid)
    else $error("mc_mul: response taken while none is valid");
endmodule
