// monitor_app: status-report application server. Each request message it
// receives (through its own reliability layer) is answered with a message
// holding NSTAT 32-bit status words, such as frame and error counters of
// the other components, wired to status_in by the enclosing design.
//
// Its thread loops: ArrayRead a request (the payload is ignored and
// normally empty), take a snapshot of status_in, ArrayWrite the NSTAT
// snapshot words. Requests served are counted in requests.
// The snapshot is taken in the cycle the request completes, so the
// words of one reply are mutually consistent.
//
// Follows the design: a server returning counters from other parts of the
// FPGA. The reply layout and the snapshot are this design's.
module monitor_app
  import kiwi_pkg::*;
#(
  parameter int unsigned NSTAT = 10
) (
  input  logic                   clk,
  input  logic                   reset,
  input  logic [NSTAT-1:0][31:0] status_in,
  // lower layer (dispatcher client port)
  output logic                   wi_req,
  input  logic                   wi_ack,
  output logic [31:0]            wi_d,
  output framing_e               wi_kfp,
  output logic                   ri_req,
  input  logic                   ri_ack,
  input  logic [31:0]            ri_return,
  output logic [31:0]            requests
);

  localparam int unsigned AW = (NSTAT > 1) ? $clog2(NSTAT) : 1;

  typedef enum logic [1:0] {M_READ, M_READW, M_WRITE, M_WRITEW} mstate_e;
  mstate_e     state;
  logic [31:0] snapshot [NSTAT];

  logic          ar_req, ar_ack, aw_req, aw_ack;
  logic [31:0]   ar_len;
  logic          rl_we, dr_req;
  logic [AW-1:0] rl_waddr, rl_raddr;
  logic [31:0]   rl_wdata, seq_errors, fmt_errors, rx_msgs, tx_msgs;

  reliable_layer #(.BUF_WORDS(NSTAT), .DISCARD_AFTER_READ(1'b0)) u_rl (
    .clk, .reset,
    .ar_req, .ar_ack, .ar_len,
    .aw_req, .aw_ack, .aw_len(32'(NSTAT)),
    .buf_we(rl_we), .buf_waddr(rl_waddr), .buf_wdata(rl_wdata),
    .buf_raddr(rl_raddr), .buf_rdata(snapshot[rl_raddr]),
    .wi_req, .wi_ack, .wi_d, .wi_kfp,
    .ri_req, .ri_ack, .ri_return,
    .dr_req, .dr_ack(1'b0),
    .seq_errors, .fmt_errors, .rx_msgs, .tx_msgs
  );

  always_ff @(posedge clk) begin
    if (reset) begin
      state    <= M_READ;
      requests <= '0;
      for (int k = 0; k < NSTAT; k++) snapshot[k] <= '0;
    end else begin
      case (state)
        M_READ: if (ar_ack) begin
          for (int k = 0; k < NSTAT; k++) snapshot[k] <= status_in[k];
          state <= M_READW;
        end
        M_READW: if (!ar_ack) state <= M_WRITE;
        M_WRITE: if (aw_ack) state <= M_WRITEW;
        M_WRITEW: if (!aw_ack) begin
          requests <= requests + 1'b1;
          state    <= M_READ;
        end
        default: state <= M_READ;
      endcase
    end
  end

  assign ar_req = (state == M_READ);
  assign aw_req = (state == M_WRITE);

endmodule
