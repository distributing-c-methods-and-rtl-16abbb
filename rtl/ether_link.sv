// ether_link: the network device between the Ethernet MAC's LocalLink
// ports and the rest of the FPGA (the KiwiNetworkDevice service).
//
// How it works. Two byte-wide buffers of RX_BYTES and TX_BYTES bytes sit
// between the MAC and four remotely callable methods, each a four-phase
// req/ack handshake (see kiwi_pkg):
//   WriteInt(d, kfp)  stores the four bytes of d, most significant first,
//                     one byte per clock (byte-wide memory). FR_START
//                     rewinds the transmit pointer to just after the MAC
//                     addresses; FR_END sends the frame before acking.
//   ReadInt()         blocks until a frame is held, then returns the next
//                     four received bytes (big-endian), one byte per clock,
//                     starting after the MAC addresses. Bytes past the end
//                     of the frame read as zero.
//   RxBytes()         blocks until a frame is held and returns its length.
//   DiscardRxFrame()  frees the receive buffer for the next frame.
// The transmitter sends the frame back to where the last frame came from:
// the source address of the held receive frame becomes the destination and
// its destination becomes the source, then bytes 12.. of the transmit buffer
// follow. tx_sof_n marks the first byte and tx_eof_n the last; a byte moves
// in each cycle where tx_src_rdy_n and tx_dst_rdy_n are both low.
// The receiver accepts one frame at a time: rx_dst_rdy_n is high while a
// frame is held. Bytes beyond a buffer's size are dropped and counted.
//
// Follows the design: buffer sizes, address swap, byte-per-clock writes,
// the four methods. Own choices: FR_START rewinds to byte 12 (not 0) so
// the payload follows the MAC header, the transmitter waits for
// tx_dst_rdy_n, overflow handling, zero bytes past the frame end.
module ether_link
  import kiwi_pkg::*;
#(
  parameter int unsigned RX_BYTES = 2048,
  parameter int unsigned TX_BYTES = 2048
) (
  input  logic        clk,
  input  logic        reset,
  // LocalLink transmit (to the MAC)
  output logic [7:0]  tx_data,
  output logic        tx_sof_n,
  output logic        tx_eof_n,
  output logic        tx_src_rdy_n,
  input  logic        tx_dst_rdy_n,
  // LocalLink receive (from the MAC)
  input  logic [7:0]  rx_data,
  input  logic        rx_sof_n,
  input  logic        rx_eof_n,
  input  logic        rx_src_rdy_n,
  output logic        rx_dst_rdy_n,
  // WriteInt
  input  logic        wi_req,
  output logic        wi_ack,
  input  logic [31:0] wi_d,
  input  framing_e    wi_kfp,
  // ReadInt
  input  logic        ri_req,
  output logic        ri_ack,
  output logic [31:0] ri_return,
  // RxBytes
  input  logic        rb_req,
  output logic        rb_ack,
  output logic [31:0] rb_return,
  // DiscardRxFrame
  input  logic        dr_req,
  output logic        dr_ack,
  // status counters
  output logic [31:0] rx_frames,
  output logic [31:0] tx_frames,
  output logic [31:0] rx_overflows,
  output logic [31:0] tx_overflows
);

  localparam int unsigned RXA = $clog2(RX_BYTES + 1);
  localparam int unsigned TXA = $clog2(TX_BYTES + 1);
  localparam int unsigned RXI = $clog2(RX_BYTES);
  localparam int unsigned TXI = $clog2(TX_BYTES);

  logic [7:0] rx_mem [RX_BYTES];
  logic [7:0] tx_mem [TX_BYTES];

  // ---------------------------------------------------------------- receive
  logic           rx_full, rx_in_frame, rx_ovf;
  logic [RXA-1:0] rx_wptr, rx_len;

  assign rx_dst_rdy_n = rx_full;

  // ---------------------------------------------------------------- methods
  typedef enum logic [1:0] {M_IDLE, M_READ, M_ACK} mstate_e;
  mstate_e        m_state;
  logic [RXA-1:0] rd_ptr;
  logic [1:0]     rd_k;
  logic [31:0]    rd_word;
  logic [1:0]     m_which;          // 0 ReadInt, 1 RxBytes, 2 Discard
  logic           discard_now;
  logic [7:0]     rd_byte;

  assign rd_byte = (rd_ptr < rx_len && rd_ptr < RXA'(RX_BYTES))
                   ? rx_mem[RXI'(rd_ptr)] : 8'h00;

  always_ff @(posedge clk) begin
    if (reset) begin
      m_state   <= M_IDLE;
      rd_ptr    <= RXA'(MAC_HDR_BYTES);
      rd_k      <= '0;
      rd_word   <= '0;
      m_which   <= '0;
      ri_return <= '0;
      rb_return <= '0;
    end else begin
      case (m_state)
        M_IDLE: begin
          if (dr_req) begin
            m_which <= 2'd2;
            rd_ptr  <= RXA'(MAC_HDR_BYTES);
            m_state <= M_ACK;
          end else if (rb_req && rx_full) begin
            m_which   <= 2'd1;
            rb_return <= 32'(rx_len);
            m_state   <= M_ACK;
          end else if (ri_req && rx_full) begin
            m_which <= 2'd0;
            rd_k    <= '0;
            m_state <= M_READ;
          end
        end
        M_READ: begin
          rd_word <= {rd_word[23:0], rd_byte};
          rd_ptr  <= rd_ptr + 1'b1;
          rd_k    <= rd_k + 1'b1;
          if (rd_k == 2'd3) begin
            ri_return <= {rd_word[23:0], rd_byte};
            m_state   <= M_ACK;
          end
        end
        M_ACK: begin
          // hold ack until the caller withdraws its request
          if ((m_which == 2'd0 && !ri_req) || (m_which == 2'd1 && !rb_req) ||
              (m_which == 2'd2 && !dr_req))
            m_state <= M_IDLE;
        end
        default: m_state <= M_IDLE;
      endcase
    end
  end

  assign ri_ack = (m_state == M_ACK) && (m_which == 2'd0);
  assign rb_ack = (m_state == M_ACK) && (m_which == 2'd1);
  assign dr_ack = (m_state == M_ACK) && (m_which == 2'd2);
  assign discard_now = (m_state == M_IDLE) && dr_req;

  // receive state: one frame at a time into rx_mem
  always_ff @(posedge clk) begin
    if (reset) begin
      rx_full      <= 1'b0;
      rx_in_frame  <= 1'b0;
      rx_ovf       <= 1'b0;
      rx_wptr      <= '0;
      rx_len       <= '0;
      rx_frames    <= '0;
      rx_overflows <= '0;
    end else if (discard_now) begin
      rx_full     <= 1'b0;
      rx_in_frame <= 1'b0;
    end else if (!rx_full && !rx_src_rdy_n) begin
      logic [RXA-1:0] p;
      p = rx_sof_n ? rx_wptr : '0;
      if (!rx_sof_n || rx_in_frame) begin
        if (!rx_sof_n) rx_ovf <= 1'b0;
        if (p < RXA'(RX_BYTES)) begin
          rx_mem[RXI'(p)] <= rx_data;
          rx_wptr <= p + 1'b1;
        end else if (!(rx_ovf && rx_sof_n)) begin
          rx_ovf       <= 1'b1;
          rx_overflows <= rx_overflows + 1'b1;
        end
        if (!rx_eof_n) begin
          rx_full     <= 1'b1;
          rx_in_frame <= 1'b0;
          rx_len      <= (p < RXA'(RX_BYTES)) ? p + 1'b1 : RXA'(RX_BYTES);
          rx_frames   <= rx_frames + 1'b1;
        end else begin
          rx_in_frame <= 1'b1;
        end
      end
    end
  end

  // --------------------------------------------------------------- transmit
  typedef enum logic [1:0] {T_IDLE, T_WR, T_SEND, T_ACK} tstate_e;
  tstate_e        t_state;
  logic [TXA-1:0] tx_ptr, tx_len, tx_j;
  logic [1:0]     wr_k;
  logic [31:0]    wr_d;
  framing_e       wr_kfp;
  logic           tx_ovf;
  logic [7:0]     wr_byte;

  always_comb begin
    case (wr_k)
      2'd0:    wr_byte = wr_d[31:24];
      2'd1:    wr_byte = wr_d[23:16];
      2'd2:    wr_byte = wr_d[15:8];
      default: wr_byte = wr_d[7:0];
    endcase
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      t_state      <= T_IDLE;
      tx_ptr       <= TXA'(MAC_HDR_BYTES);
      tx_len       <= '0;
      tx_j         <= '0;
      wr_k         <= '0;
      wr_d         <= '0;
      wr_kfp       <= FR_MID;
      tx_ovf       <= 1'b0;
      tx_frames    <= '0;
      tx_overflows <= '0;
    end else begin
      case (t_state)
        T_IDLE: if (wi_req) begin
          wr_d    <= wi_d;
          wr_kfp  <= wi_kfp;
          wr_k    <= '0;
          if (wi_kfp == FR_START) begin
            tx_ptr <= TXA'(MAC_HDR_BYTES);
            tx_ovf <= 1'b0;
          end
          t_state <= T_WR;
        end
        T_WR: begin
          logic [TXA-1:0] np;
          np = tx_ptr;
          if (tx_ptr < TXA'(TX_BYTES)) begin
            tx_mem[TXI'(tx_ptr)] <= wr_byte;
            np = tx_ptr + 1'b1;
          end else if (!tx_ovf) begin
            tx_ovf       <= 1'b1;
            tx_overflows <= tx_overflows + 1'b1;
          end
          tx_ptr <= np;
          wr_k   <= wr_k + 1'b1;
          if (wr_k == 2'd3) begin
            if (wr_kfp == FR_END) begin
              tx_len  <= np;
              tx_j    <= '0;
              t_state <= T_SEND;
            end else begin
              t_state <= T_ACK;
            end
          end
        end
        T_SEND: if (!tx_dst_rdy_n) begin
          if (tx_j == tx_len - 1'b1) begin
            tx_frames <= tx_frames + 1'b1;
            t_state   <= T_ACK;
          end
          tx_j <= tx_j + 1'b1;
        end
        T_ACK: if (!wi_req) t_state <= T_IDLE;
        default: t_state <= T_IDLE;
      endcase
    end
  end

  assign wi_ack = (t_state == T_ACK);

  // LocalLink transmit outputs, from the byte counter
  always_comb begin
    tx_src_rdy_n = !(t_state == T_SEND);
    tx_sof_n     = !(t_state == T_SEND && tx_j == '0);
    tx_eof_n     = !(t_state == T_SEND && tx_j == tx_len - 1'b1);
    if (tx_j < TXA'(6))
      tx_data = rx_mem[RXI'(tx_j + TXA'(6))];     // last sender's source
    else if (tx_j < TXA'(MAC_HDR_BYTES))
      tx_data = rx_mem[RXI'(tx_j - TXA'(6))];     // our address
    else
      tx_data = tx_mem[TXI'(tx_j)];
    if (t_state != T_SEND) tx_data = 8'h00;
  end

endmodule
