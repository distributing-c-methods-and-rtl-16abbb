// photo_filter_app: single-channel photo filter application server with
// its own reliability layer, as hosted three times on the shared FPGA.
//
// Its one thread loops forever: ArrayRead a work message into the local
// work buffer (BUF_WORDS 32-bit words), reset the convolver channel,
// replace every word workbuf[i], i < len, by convolve(workbuf[i]), then
// ArrayWrite the len results back. The reliability layer's lower side
// (WriteInt, ReadInt) is brought out to connect to a dispatcher client
// port. Indicator outputs show the phase: rx_led while waiting for work,
// work_led while convolving, tx_led while sending, poll_led toggling once
// per processed word.
//
// Timing: each word costs 11 cycles in the channel plus 3 of handshake.
// Follows the design: the work loop, the buffer size and the indicators.
// The phase handshakes between the thread and its parts are this design's.
module photo_filter_app
  import kiwi_pkg::*;
#(
  parameter int unsigned BUF_WORDS = 512
) (
  input  logic        clk,
  input  logic        reset,
  // lower layer (dispatcher client port or network device)
  output logic        wi_req,
  input  logic        wi_ack,
  output logic [31:0] wi_d,
  output framing_e    wi_kfp,
  output logic        ri_req,
  input  logic        ri_ack,
  input  logic [31:0] ri_return,
  // indicators and status
  output logic        rx_led,
  output logic        tx_led,
  output logic        work_led,
  output logic        poll_led,
  output logic [31:0] jobs_done,
  output logic [31:0] seq_errors,
  output logic [31:0] fmt_errors
);

  localparam int unsigned AW = (BUF_WORDS > 1) ? $clog2(BUF_WORDS) : 1;

  logic [31:0] workbuf [BUF_WORDS];

  typedef enum logic [2:0] {P_READ, P_READW, P_RESET, P_CONV, P_CONVW,
                            P_WRITE, P_WRITEW} pstate_e;
  pstate_e     state;
  logic [31:0] len, i;

  logic          ar_req, ar_ack, aw_req, aw_ack;
  logic [31:0]   ar_len;
  logic          rl_we;
  logic [AW-1:0] rl_waddr, rl_raddr;
  logic [31:0]   rl_wdata;
  logic          dr_req;
  logic [31:0]   rx_msgs, tx_msgs;

  reliable_layer #(.BUF_WORDS(BUF_WORDS), .DISCARD_AFTER_READ(1'b0)) u_rl (
    .clk, .reset,
    .ar_req, .ar_ack, .ar_len,
    .aw_req, .aw_ack, .aw_len(len),
    .buf_we(rl_we), .buf_waddr(rl_waddr), .buf_wdata(rl_wdata),
    .buf_raddr(rl_raddr), .buf_rdata(workbuf[rl_raddr]),
    .wi_req, .wi_ack, .wi_d, .wi_kfp,
    .ri_req, .ri_ack, .ri_return,
    .dr_req, .dr_ack(1'b0),
    .seq_errors, .fmt_errors, .rx_msgs, .tx_msgs
  );

  logic        ch_reset, conv_req, conv_ack;
  logic [31:0] conv_out;


  photo_filter_channel u_ch (
    .clk, .reset, .ch_reset,
    .conv_req, .conv_ack,
    .din(workbuf[AW'(i)]), .dout(conv_out)
  );

  always_ff @(posedge clk) begin
    if (reset) begin
      state     <= P_READ;
      len       <= '0;
      i         <= '0;
      jobs_done <= '0;
      poll_led  <= 1'b1;
    end else begin
      case (state)
        P_READ:  if (ar_ack) begin
          len   <= ar_len;
          state <= P_READW;
        end
        P_READW: if (!ar_ack) state <= P_RESET;
        P_RESET: begin
          i     <= '0;
          state <= P_CONV;
        end
        P_CONV: begin
          if (i >= len) state <= P_WRITE;
          else if (conv_ack) state <= P_CONVW;
        end
        P_CONVW: if (!conv_ack) begin
          i        <= i + 1'b1;
          poll_led <= !poll_led;
          state    <= P_CONV;
        end
        P_WRITE: if (aw_ack) state <= P_WRITEW;
        P_WRITEW: if (!aw_ack) begin
          jobs_done <= jobs_done + 1'b1;
          state     <= P_READ;
        end
        default: state <= P_READ;
      endcase
    end
  end

  // work buffer: written by the reliability layer while reading a
  // message, and by the work loop with each convolution result
  always_ff @(posedge clk) begin
    if (rl_we)
      workbuf[rl_waddr] <= rl_wdata;
    else if (state == P_CONV && conv_ack && i < len)
      workbuf[AW'(i)] <= conv_out;
  end

  assign ar_req   = (state == P_READ);
  assign aw_req   = (state == P_WRITE);
  assign ch_reset = (state == P_RESET);
  assign conv_req = (state == P_CONV) && (i < len);
  assign rx_led   = (state == P_READ) || (state == P_READW);
  assign work_led = (state inside {P_RESET, P_CONV, P_CONVW});
  assign tx_led   = (state == P_WRITE) || (state == P_WRITEW);

endmodule
