// three_channels_app: the three-colour-channel photo filter application of
// the single-application FPGA. One thread, one reliability layer, three
// convolver channels (yy, uu, vv) whose samples are interleaved in the
// work buffer: word i belongs to channel i mod 3.
//
// The thread loops: ArrayRead a message into the work buffer (BUF_WORDS
// words), reset all three channels, then for i = 0, 3, 6, ... while i < len
// convolve workbuf[i] with channel 0, workbuf[i+1] with channel 1 and
// workbuf[i+2] with channel 2, one after the other, writing each result
// back in place; finally ArrayWrite len words. As in the single-threaded
// form of the application, all three words of a group are processed even
// when len is not a multiple of three (those past len are not sent); words
// past the end of the buffer are skipped. The reliability layer frees the
// device's receive frame after each message (DISCARD_AFTER_READ).
// Indicators as in photo_filter_app.
//
// PARALLEL_CHANNELS selects the form of the work loop. 0 (default) is the
// single-threaded loop above: one convolution at a time, 42 cycles per
// group of three words (14 per word). 1 gives each channel its own thread, as in the
// fuller version of the application: channel c walks words c, c+3, c+6, ...
// while its group index is below len, independently of the others, so the
// three convolvers run at the same time (14 cycles per group). Both
// forms convolve the same words in the same order per channel and give
// identical results; the work buffer then has three read and three write
// ports, so it is built from flip-flops rather than RAM.
//
// Follows the design: the interleaved work loop, sequential channels, the
// buffer size. Handshakes, the skip rule at the buffer end and the shape of
// the threaded form (only named, not detailed) are this design's.
module three_channels_app
  import kiwi_pkg::*;
#(
  parameter int unsigned BUF_WORDS         = 512,
  parameter bit          PARALLEL_CHANNELS = 1'b0
) (
  input  logic        clk,
  input  logic        reset,
  // network device methods
  output logic        wi_req,
  input  logic        wi_ack,
  output logic [31:0] wi_d,
  output framing_e    wi_kfp,
  output logic        ri_req,
  input  logic        ri_ack,
  input  logic [31:0] ri_return,
  output logic        dr_req,
  input  logic        dr_ack,
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

  typedef enum logic [2:0] {P_READ, P_READW, P_RESET, P_CONV, P_CONVW,
                            P_WRITE, P_WRITEW} pstate_e;
  pstate_e     state;
  logic [31:0] len, i;
  logic [1:0]  c;                 // channel within the group
  logic [31:0] idx;               // i + c

  logic [31:0] workbuf [BUF_WORDS];

  logic          ar_req, ar_ack, aw_req, aw_ack;
  logic [31:0]   ar_len;
  logic          rl_we;
  logic [AW-1:0] rl_waddr, rl_raddr;
  logic [31:0]   rl_wdata, rx_msgs, tx_msgs;

  reliable_layer #(.BUF_WORDS(BUF_WORDS), .DISCARD_AFTER_READ(1'b1)) u_rl (
    .clk, .reset,
    .ar_req, .ar_ack, .ar_len,
    .aw_req, .aw_ack, .aw_len(len),
    .buf_we(rl_we), .buf_waddr(rl_waddr), .buf_wdata(rl_wdata),
    .buf_raddr(rl_raddr), .buf_rdata(workbuf[rl_raddr]),
    .wi_req, .wi_ack, .wi_d, .wi_kfp,
    .ri_req, .ri_ack, .ri_return,
    .dr_req, .dr_ack,
    .seq_errors, .fmt_errors, .rx_msgs, .tx_msgs
  );

  logic        ch_reset;
  logic [2:0]  conv_req, conv_ack;
  logic [31:0] conv_out [3];
  logic        in_buf;
  logic [31:0] ridx [3];          // word each channel works on
  logic [2:0]  wb_we;             // result write per channel
  logic        conv_done;         // threaded form: every channel finished

  assign idx    = i + 32'(c);
  assign in_buf = idx < 32'(BUF_WORDS);

  if (PARALLEL_CHANNELS) begin : g_par
    // one thread per channel: group index pi, waiting-for-ack-release flag ph
    logic [31:0] pi [3];
    logic [2:0]  ph, pbuf, pact;
    for (genvar g = 0; g < 3; g++) begin : g_t
      assign ridx[g]  = pi[g] + 32'(g);
      assign pbuf[g]  = ridx[g] < 32'(BUF_WORDS);
      assign pact[g]  = (state == P_CONV) && pi[g] < len;
      assign conv_req[g] = pact[g] && pbuf[g] && !ph[g];
      assign wb_we[g]    = conv_req[g] && conv_ack[g];
      always_ff @(posedge clk) begin
        if (reset || state == P_RESET) begin
          pi[g] <= '0;
          ph[g] <= 1'b0;
        end else if (pact[g]) begin
          if (ph[g]) begin
            if (!conv_ack[g]) begin
              ph[g] <= 1'b0;
              pi[g] <= pi[g] + 32'd3;
            end
          end else if (!pbuf[g]) begin
            pi[g] <= pi[g] + 32'd3;
          end else if (conv_ack[g]) begin
            ph[g] <= 1'b1;
          end
        end
      end
    end
    assign conv_done = !(|pact);
  end else begin : g_seq
    always_comb begin
      conv_req = '0;
      wb_we    = '0;
      if (state == P_CONV && i < len && in_buf) begin
        conv_req[c] = 1'b1;
        wb_we[c]    = conv_ack[c];
      end
    end
    assign ridx      = '{idx, idx, idx};
    assign conv_done = 1'b0;
  end

  for (genvar g = 0; g < 3; g++) begin : g_ch
    photo_filter_channel u_ch (
      .clk, .reset, .ch_reset,
      .conv_req(conv_req[g]), .conv_ack(conv_ack[g]),
      .din(workbuf[AW'(ridx[g])]), .dout(conv_out[g])
    );
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      state     <= P_READ;
      len       <= '0;
      i         <= '0;
      c         <= '0;
      jobs_done <= '0;
      poll_led  <= 1'b1;
    end else begin
      if (PARALLEL_CHANNELS && wb_we[0]) poll_led <= !poll_led;
      case (state)
        P_READ:  if (ar_ack) begin
          len   <= ar_len;
          state <= P_READW;
        end
        P_READW: if (!ar_ack) state <= P_RESET;
        P_RESET: begin
          i     <= '0;
          c     <= '0;
          state <= P_CONV;
        end
        P_CONV: begin
          if (PARALLEL_CHANNELS) begin
            if (conv_done) state <= P_WRITE;
          end else if (i >= len) state <= P_WRITE;
          else if (!in_buf || conv_ack[c]) state <= P_CONVW;
        end
        P_CONVW: if (!conv_ack[c]) begin
          if (c == 2'd2) begin
            c        <= '0;
            i        <= i + 32'd3;
            poll_led <= !poll_led;
          end else begin
            c <= c + 2'd1;
          end
          state <= P_CONV;
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

  always_ff @(posedge clk) begin
    if (rl_we)
      workbuf[rl_waddr] <= rl_wdata;
    else
      for (int g = 0; g < 3; g++)
        if (wb_we[g]) workbuf[AW'(ridx[g])] <= conv_out[g];
  end

  assign ar_req   = (state == P_READ);
  assign aw_req   = (state == P_WRITE);
  assign ch_reset = (state == P_RESET);
  assign rx_led   = (state == P_READ) || (state == P_READW);
  assign work_led = (state inside {P_RESET, P_CONV, P_CONVW});
  assign tx_led   = (state == P_WRITE) || (state == P_WRITEW);

endmodule
