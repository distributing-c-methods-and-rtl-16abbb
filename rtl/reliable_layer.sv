// reliable_layer: reliability and presentation layer of one application
// server. It turns a whole-array exchange into a stream of word-sized
// remote calls on the layer below (the network device, or a dispatcher
// client port).
//
// ArrayWrite(len) (aw_*) sends one message of len+4 words:
//   PROTO_ID_START (FR_START), tx sequence number, len, the words
//   buf[0..len-1] read through buf_raddr/buf_rdata, PROTO_ID_END (FR_END);
// then the transmit sequence number counts up.
// ArrayRead() (ar_*) receives a message of the same format through ReadInt,
// stores the payload through buf_we/buf_waddr/buf_wdata and returns the
// number of words stored in ar_len. It checks the protocol ids and the
// sequence number; errors are only counted (no retransmission), and the
// expected sequence number resynchronises to the received one plus one.
// Words beyond BUF_WORDS are read and dropped. With DISCARD_AFTER_READ set
// it also frees the device's receive frame with DiscardRxFrame (used when
// the layer sits directly on the network device).
//
// Timing: buf_rdata must be valid in the same cycle as buf_raddr
// (distributed RAM). All calls are four-phase req/ack handshakes; ar_ack
// and aw_ack stay up until the request drops.
// Follows the design: the ArrayWrite format and the sequence and length
// fields, error counting without retransmit. Own choices: the ArrayRead
// format mirrors ArrayWrite, the checks, the overlength rule.
module reliable_layer
  import kiwi_pkg::*;
#(
  parameter int unsigned BUF_WORDS          = 512,
  parameter bit          DISCARD_AFTER_READ = 1'b0,
  localparam int unsigned AW = (BUF_WORDS > 1) ? $clog2(BUF_WORDS) : 1
) (
  input  logic          clk,
  input  logic          reset,
  // ArrayRead
  input  logic          ar_req,
  output logic          ar_ack,
  output logic [31:0]   ar_len,
  // ArrayWrite
  input  logic          aw_req,
  output logic          aw_ack,
  input  logic [31:0]   aw_len,
  // application buffer
  output logic          buf_we,
  output logic [AW-1:0] buf_waddr,
  output logic [31:0]   buf_wdata,
  output logic [AW-1:0] buf_raddr,
  input  logic [31:0]   buf_rdata,
  // lower layer: WriteInt
  output logic          wi_req,
  input  logic          wi_ack,
  output logic [31:0]   wi_d,
  output framing_e      wi_kfp,
  // lower layer: ReadInt
  output logic          ri_req,
  input  logic          ri_ack,
  input  logic [31:0]   ri_return,
  // lower layer: DiscardRxFrame
  output logic          dr_req,
  input  logic          dr_ack,
  // error log and counters
  output logic [31:0]   seq_errors,
  output logic [31:0]   fmt_errors,
  output logic [31:0]   rx_msgs,
  output logic [31:0]   tx_msgs
);

  // ---------------------------------------------------------- ArrayRead
  typedef enum logic [2:0] {A_IDLE, A_ID, A_SEQ, A_LEN, A_DATA, A_END,
                            A_DISC, A_ACK} astate_e;
  astate_e     a_state;
  logic        a_ph;
  logic [31:0] rx_seqno, a_len, a_cnt;

  always_ff @(posedge clk) begin
    if (reset) begin
      a_state    <= A_IDLE;
      a_ph       <= 1'b0;
      rx_seqno   <= '0;
      a_len      <= '0;
      a_cnt      <= '0;
      ar_len     <= '0;
      seq_errors <= '0;
      fmt_errors <= '0;
      rx_msgs    <= '0;
    end else begin
      case (a_state)
        A_IDLE: if (ar_req) begin
          a_ph    <= 1'b0;
          a_state <= A_ID;
        end
        A_ID, A_SEQ, A_LEN, A_DATA, A_END: begin
          if (!a_ph && ri_ack) begin
            a_ph <= 1'b1;
            case (a_state)
              A_ID:  if (ri_return != PROTO_ID_START) fmt_errors <= fmt_errors + 1'b1;
              A_SEQ: begin
                if (ri_return != rx_seqno) seq_errors <= seq_errors + 1'b1;
                rx_seqno <= ri_return + 1'b1;
              end
              A_LEN: begin
                a_len <= ri_return;
                a_cnt <= '0;
              end
              A_DATA: a_cnt <= a_cnt + 1'b1;
              default: if (ri_return != PROTO_ID_END) fmt_errors <= fmt_errors + 1'b1;
            endcase
          end
          if (a_ph && !ri_ack) begin
            a_ph <= 1'b0;
            case (a_state)
              A_ID:   a_state <= A_SEQ;
              A_SEQ:  a_state <= A_LEN;
              A_LEN:  a_state <= (a_len == '0) ? A_END : A_DATA;
              A_DATA: if (a_cnt == a_len) a_state <= A_END;
              default: begin
                rx_msgs <= rx_msgs + 1'b1;
                ar_len  <= (a_len > 32'(BUF_WORDS)) ? 32'(BUF_WORDS) : a_len;
                if (a_len > 32'(BUF_WORDS)) fmt_errors <= fmt_errors + 1'b1;
                a_state <= DISCARD_AFTER_READ ? A_DISC : A_ACK;
              end
            endcase
          end
        end
        A_DISC: begin
          if (!a_ph && dr_ack) a_ph <= 1'b1;
          if (a_ph && !dr_ack) begin
            a_ph    <= 1'b0;
            a_state <= A_ACK;
          end
        end
        A_ACK: if (!ar_req) a_state <= A_IDLE;
        default: a_state <= A_IDLE;
      endcase
    end
  end

  assign ar_ack = (a_state == A_ACK);
  assign ri_req = !a_ph && (a_state inside {A_ID, A_SEQ, A_LEN, A_DATA, A_END});
  assign dr_req = !a_ph && (a_state == A_DISC);
  // store each payload word as its ReadInt is acknowledged
  assign buf_we    = !a_ph && ri_ack && (a_state == A_DATA) && (a_cnt < 32'(BUF_WORDS));
  assign buf_waddr = AW'(a_cnt);
  assign buf_wdata = ri_return;

  // --------------------------------------------------------- ArrayWrite
  typedef enum logic [2:0] {W_IDLE, W_ID, W_SEQ, W_LEN, W_DATA, W_END, W_ACK}
    wstate_e;
  wstate_e     w_state;
  logic        w_ph;
  logic [31:0] tx_seqno, w_len, w_cnt;

  always_ff @(posedge clk) begin
    if (reset) begin
      w_state  <= W_IDLE;
      w_ph     <= 1'b0;
      tx_seqno <= '0;
      w_len    <= '0;
      w_cnt    <= '0;
      tx_msgs  <= '0;
    end else begin
      case (w_state)
        W_IDLE: if (aw_req) begin
          w_len   <= (aw_len > 32'(BUF_WORDS)) ? 32'(BUF_WORDS) : aw_len;
          w_cnt   <= '0;
          w_ph    <= 1'b0;
          w_state <= W_ID;
        end
        W_ACK: if (!aw_req) w_state <= W_IDLE;
        default: begin
          if (!w_ph && wi_ack) w_ph <= 1'b1;
          if (w_ph && !wi_ack) begin
            w_ph <= 1'b0;
            case (w_state)
              W_ID:  w_state <= W_SEQ;
              W_SEQ: w_state <= W_LEN;
              W_LEN: w_state <= (w_len == '0) ? W_END : W_DATA;
              W_DATA: begin
                w_cnt <= w_cnt + 1'b1;
                if (w_cnt + 1'b1 == w_len) w_state <= W_END;
              end
              default: begin
                tx_seqno <= tx_seqno + 1'b1;
                tx_msgs  <= tx_msgs + 1'b1;
                w_state  <= W_ACK;
              end
            endcase
          end
        end
      endcase
    end
  end

  assign aw_ack    = (w_state == W_ACK);
  assign buf_raddr = AW'(w_cnt);

  always_comb begin
    wi_req = !w_ph && !(w_state inside {W_IDLE, W_ACK});
    wi_kfp = FR_MID;
    wi_d   = '0;
    case (w_state)
      W_ID:   begin wi_d = PROTO_ID_START; wi_kfp = FR_START; end
      W_SEQ:  wi_d = tx_seqno;
      W_LEN:  wi_d = w_len;
      W_DATA: wi_d = buf_rdata;
      W_END:  begin wi_d = PROTO_ID_END; wi_kfp = FR_END; end
      default: ;
    endcase
  end

  a_wi_hold: assert property (@(posedge clk) disable iff (reset)
                              wi_req && !wi_ack |=> wi_req);
  a_ri_hold: assert property (@(posedge clk) disable iff (reset)
                              ri_req && !ri_ack |=> ri_req);

endmodule
