// llc_dispatcher: shares one network device among PORTS application
// servers, each attached to its own client port (a "stub" port pair).
//
// Transmit: a client's WriteInt(d, kfp) arrives on cw_*[p]. A call with
// FR_START must first take the transmit mutex; while another client owns
// it the call simply stalls (no ack). Once granted (round-robin among
// waiting starters) the dispatcher issues two device WriteInts: the LLC
// header {LLC_HEADER_CONST, 8'(p)} with FR_START, then d with FR_MID. The
// owner's later calls pass through unchanged; the call with FR_END is
// forwarded (the device sends the frame) and then releases the mutex.
//
// Receive: a dispatcher thread loops over frames: RxBytes (blocks until a
// frame is held), ReadInt for the packet-length word (the number of words
// the client will read), then ReadInt until a word whose upper half is
// LLC_HEADER_CONST appears; its low byte is the port. A port that is not
// registered (>= PORTS_IN_USE), a zero length or a frame with no header is
// discarded. Otherwise the port's rx_ready flag is set and the thread
// waits. The client's ReadInt calls (cr_*[p]) block while its rx_ready is
// clear; each one proxies a device ReadInt and counts the length down, and
// the last clears rx_ready. The thread then discards the frame and loops.
//
// All device and client calls are four-phase req/ack handshakes.
// Follows the design: header insertion, exclusion mutex, header scan,
// port check, per-port ready flags, length countdown. Own choices: the
// header constant, round-robin grant order, the RxBytes-bounded header scan,
// zero-length frames discarded, and the frame being discarded by the
// dispatcher after its client has read it.
module llc_dispatcher
  import kiwi_pkg::*;
#(
  parameter int unsigned PORTS        = 4,
  parameter int unsigned PORTS_IN_USE = PORTS
) (
  input  logic                   clk,
  input  logic                   reset,
  // client ports: ClientWriteInt
  input  logic [PORTS-1:0]       cw_req,
  output logic [PORTS-1:0]       cw_ack,
  input  logic [PORTS-1:0][31:0] cw_d,
  input  framing_e [PORTS-1:0]   cw_kfp,
  // client ports: ClientReadInt
  input  logic [PORTS-1:0]       cr_req,
  output logic [PORTS-1:0]       cr_ack,
  output logic [31:0]            cr_data,
  // device: WriteInt
  output logic                   dev_wi_req,
  input  logic                   dev_wi_ack,
  output logic [31:0]            dev_wi_d,
  output framing_e               dev_wi_kfp,
  // device: ReadInt
  output logic                   dev_ri_req,
  input  logic                   dev_ri_ack,
  input  logic [31:0]            dev_ri_return,
  // device: RxBytes
  output logic                   dev_rb_req,
  input  logic                   dev_rb_ack,
  input  logic [31:0]            dev_rb_return,
  // device: DiscardRxFrame
  output logic                   dev_dr_req,
  input  logic                   dev_dr_ack,
  // status
  output logic [PORTS-1:0]       rx_ready,
  output logic [31:0]            frames_forwarded,
  output logic [31:0]            frames_discarded,
  output logic [31:0]            tx_stalls
);

  localparam int unsigned PW = (PORTS > 1) ? $clog2(PORTS) : 1;

  // ============================================================ transmit
  typedef enum logic [2:0] {X_IDLE, X_HDR, X_DATA, X_ACK, X_OWNED, X_PASS}
    xstate_e;
  xstate_e     x_state;
  logic        x_ph;            // 0: device req up, 1: waiting for ack low
  logic [PW-1:0] owner, rr_next;
  logic        x_end;
  logic [PORTS-1:0] starters;
  logic        grant_found;
  logic [PW-1:0] grant;
  logic [PORTS-1:0] starters_q;

  always_comb begin
    for (int p = 0; p < PORTS; p++)
      starters[p] = cw_req[p] && !cw_ack[p] && (cw_kfp[p] == FR_START);
  end

  // round-robin pick starting at rr_next
  always_comb begin
    grant_found = 1'b0;
    grant       = '0;
    for (int k = 0; k < PORTS; k++) begin
      int unsigned idx;
      idx = (int'(rr_next) + k) % PORTS;
      if (!grant_found && starters[idx]) begin
        grant_found = 1'b1;
        grant       = PW'(idx);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      x_state   <= X_IDLE;
      x_ph      <= 1'b0;
      owner     <= '0;
      rr_next   <= '0;
      x_end     <= 1'b0;
      tx_stalls <= '0;
      starters_q <= '0;
    end else begin
      starters_q <= starters;
      // a start call that finds the mutex taken waits: count such events
      if (x_state != X_IDLE) begin
        for (int p = 0; p < PORTS; p++)
          if (starters[p] && PW'(p) != owner && !starters_q[p])
            tx_stalls <= tx_stalls + 1'b1;
      end
      case (x_state)
        X_IDLE: if (grant_found) begin
          owner   <= grant;
          rr_next <= (int'(grant) == PORTS - 1) ? '0 : grant + 1'b1;
          x_ph    <= 1'b0;
          x_state <= X_HDR;
        end
        X_HDR, X_DATA, X_PASS: begin
          if (!x_ph && dev_wi_ack) x_ph <= 1'b1;
          if (x_ph && !dev_wi_ack) begin
            x_ph <= 1'b0;
            if (x_state == X_HDR) x_state <= X_DATA;
            else begin
              x_end   <= (x_state == X_PASS) && (cw_kfp[owner] == FR_END);
              x_state <= X_ACK;
            end
          end
        end
        X_ACK: if (!cw_req[owner]) x_state <= x_end ? X_IDLE : X_OWNED;
        X_OWNED: if (cw_req[owner]) begin
          x_ph    <= 1'b0;
          x_state <= X_PASS;
        end
        default: x_state <= X_IDLE;
      endcase
    end
  end

  always_comb begin
    dev_wi_req = 1'b0;
    dev_wi_d   = cw_d[owner];
    dev_wi_kfp = FR_MID;
    case (x_state)
      X_HDR: begin
        dev_wi_req = !x_ph;
        dev_wi_d   = {LLC_HEADER_CONST, 8'h00, 8'(owner)};
        dev_wi_kfp = FR_START;
      end
      X_DATA: dev_wi_req = !x_ph;
      X_PASS: begin
        dev_wi_req = !x_ph;
        dev_wi_kfp = (cw_kfp[owner] == FR_END) ? FR_END : FR_MID;
      end
      default: ;
    endcase
    cw_ack = '0;
    if (x_state == X_ACK) cw_ack[owner] = 1'b1;
  end

  // ============================================================= receive
  typedef enum logic [2:0] {R_BYTES, R_LEN, R_SCAN, R_CHECK, R_WAIT, R_DISCARD}
    rstate_e;
  rstate_e       r_state;
  logic          r_ph;
  logic [31:0]   nbytes, consumed, rxpkt_len, hdr;
  logic [PW-1:0] r_port;
  // client read proxy, active in R_WAIT
  typedef enum logic [1:0] {C_IDLE, C_CALL, C_ACK} cstate_e;
  cstate_e       c_state;
  logic          c_ph;

  always_ff @(posedge clk) begin
    if (reset) begin
      r_state          <= R_BYTES;
      r_ph             <= 1'b0;
      nbytes           <= '0;
      consumed         <= '0;
      rxpkt_len        <= '0;
      hdr              <= '0;
      r_port           <= '0;
      rx_ready         <= '0;
      frames_forwarded <= '0;
      frames_discarded <= '0;
      c_state          <= C_IDLE;
      c_ph             <= 1'b0;
      cr_data          <= '0;
    end else begin
      case (r_state)
        R_BYTES: begin
          if (!r_ph && dev_rb_ack) begin
            r_ph   <= 1'b1;
            nbytes <= dev_rb_return;
          end
          if (r_ph && !dev_rb_ack) begin
            r_ph     <= 1'b0;
            consumed <= 32'(MAC_HDR_BYTES) + 32'd4;
            r_state  <= R_LEN;
          end
        end
        R_LEN, R_SCAN: begin
          if (!r_ph && dev_ri_ack) begin
            r_ph <= 1'b1;
            if (r_state == R_LEN) rxpkt_len <= dev_ri_return;
            else                  hdr       <= dev_ri_return;
          end
          if (r_ph && !dev_ri_ack) begin
            r_ph <= 1'b0;
            if (r_state == R_SCAN) r_state <= R_CHECK;
            else if (consumed + 32'd4 > nbytes) begin
              frames_discarded <= frames_discarded + 1'b1;
              r_state <= R_DISCARD;
            end
            else begin
              consumed <= consumed + 32'd4;
              r_state  <= R_SCAN;
            end
          end
        end
        R_CHECK: begin
          if (hdr[31:16] != LLC_HEADER_CONST) begin
            // keep scanning, but not past the end of the frame
            if (consumed + 32'd4 > nbytes) begin
              frames_discarded <= frames_discarded + 1'b1;
              r_state <= R_DISCARD;
            end else begin
              consumed <= consumed + 32'd4;
              r_state  <= R_SCAN;
            end
          end else if (32'(hdr[7:0]) >= 32'(PORTS_IN_USE) || rxpkt_len == '0) begin
            frames_discarded <= frames_discarded + 1'b1;
            r_state <= R_DISCARD;
          end else begin
            r_port                   <= PW'(hdr[7:0]);
            rx_ready[PW'(hdr[7:0])]  <= 1'b1;
            frames_forwarded         <= frames_forwarded + 1'b1;
            r_state                  <= R_WAIT;
          end
        end
        R_WAIT: if (rx_ready == '0) r_state <= R_DISCARD;
        R_DISCARD: begin
          if (!r_ph && dev_dr_ack) r_ph <= 1'b1;
          if (r_ph && !dev_dr_ack) begin
            r_ph    <= 1'b0;
            r_state <= R_BYTES;
          end
        end
        default: r_state <= R_BYTES;
      endcase

      // ClientReadInt proxy for the port whose rx_ready is set
      case (c_state)
        C_IDLE: if (r_state == R_WAIT && rx_ready[r_port] && cr_req[r_port]) begin
          c_ph    <= 1'b0;
          c_state <= C_CALL;
        end
        C_CALL: begin
          if (!c_ph && dev_ri_ack) begin
            c_ph    <= 1'b1;
            cr_data <= dev_ri_return;
          end
          if (c_ph && !dev_ri_ack) begin
            rxpkt_len <= rxpkt_len - 1'b1;
            if (rxpkt_len == 32'd1) rx_ready[r_port] <= 1'b0;
            c_state <= C_ACK;
          end
        end
        C_ACK: if (!cr_req[r_port]) c_state <= C_IDLE;
        default: c_state <= C_IDLE;
      endcase
    end
  end

  assign dev_rb_req = (r_state == R_BYTES) && !r_ph;
  assign dev_ri_req = (((r_state == R_LEN) || (r_state == R_SCAN)) && !r_ph) ||
                      ((c_state == C_CALL) && !c_ph);
  assign dev_dr_req = (r_state == R_DISCARD) && !r_ph;

  always_comb begin
    cr_ack = '0;
    if (c_state == C_ACK) cr_ack[r_port] = 1'b1;
  end

  // ------------------------------------------------ handshake rules
  // A caller holds its request until acknowledged; an ack only rises
  // while the request is up.
  a_wi_hold: assert property (@(posedge clk) disable iff (reset)
                              dev_wi_req && !dev_wi_ack |=> dev_wi_req);
  a_ri_hold: assert property (@(posedge clk) disable iff (reset)
                              dev_ri_req && !dev_ri_ack |=> dev_ri_req);
  a_one_owner: assert property (@(posedge clk) disable iff (reset)
                                $onehot0(cw_ack));

endmodule
