// kiwi_farm_fpga: one FPGA offering several separately built services
// over one Ethernet port. Layers, bottom up:
//   ether_link      network device (LocalLink to the Ethernet MAC)
//   llc_dispatcher  PORTS client ports; the first payload word after the
//                   length word carries the destination port number
//   3 x photo_filter_app on ports 0..2 (one colour channel each)
//   monitor_app     on port 3, reporting the counters below
// Each application carries its own reliability layer, and every
// connection between the blocks is a set of four-phase method-call nets.
//
// Received frame layout (bytes): 0-5 destination MAC, 6-11 source MAC,
// 12-15 word count W of the client message, then the LLC header word
// {LLC_HEADER_CONST, 8'h00, port}, then the W message words. A reply goes
// back to the last sender: swapped MAC addresses, the LLC header with the
// sending port, then the application's message. Words are big-endian.
//
// Monitor report words: 0 frames received, 1 frames sent, 2 frames
// forwarded, 3 frames discarded, 4-6 jobs done by filters 0-2, 7-9
// sequence errors of filters 0-2, 10 receive overflows, 11 transmit
// overflows.
//
// Follows the design: the set of blocks and their layering. Port
// assignment and the report layout are this design's.
module kiwi_farm_fpga
  import kiwi_pkg::*;
#(
  parameter int unsigned RX_BYTES  = 2048,
  parameter int unsigned TX_BYTES  = 2048,
  parameter int unsigned BUF_WORDS = 512
) (
  input  logic        clk,
  input  logic        reset,
  output logic [7:0]  tx_data,
  output logic        tx_sof_n,
  output logic        tx_eof_n,
  output logic        tx_src_rdy_n,
  input  logic        tx_dst_rdy_n,
  input  logic [7:0]  rx_data,
  input  logic        rx_sof_n,
  input  logic        rx_eof_n,
  input  logic        rx_src_rdy_n,
  output logic        rx_dst_rdy_n,
  output logic [2:0]  rx_led,
  output logic [2:0]  tx_led,
  output logic [2:0]  work_led,
  output logic [2:0]  poll_led,
  output logic [3:0]  port_rx_ready,
  output logic [31:0] frames_forwarded,
  output logic [31:0] frames_discarded,
  output logic [31:0] tx_stalls,
  output logic [31:0] monitor_requests
);

  localparam int unsigned PORTS = 4;
  localparam int unsigned NSTAT = 12;

  // device method nets
  logic        wi_req, wi_ack, ri_req, ri_ack, rb_req, rb_ack, dr_req, dr_ack;
  logic [31:0] wi_d, ri_return, rb_return;
  framing_e    wi_kfp;
  logic [31:0] rx_frames, tx_frames, rx_overflows, tx_overflows;

  ether_link #(.RX_BYTES(RX_BYTES), .TX_BYTES(TX_BYTES)) u_eth (
    .clk, .reset,
    .tx_data, .tx_sof_n, .tx_eof_n, .tx_src_rdy_n, .tx_dst_rdy_n,
    .rx_data, .rx_sof_n, .rx_eof_n, .rx_src_rdy_n, .rx_dst_rdy_n,
    .wi_req, .wi_ack, .wi_d, .wi_kfp,
    .ri_req, .ri_ack, .ri_return,
    .rb_req, .rb_ack, .rb_return,
    .dr_req, .dr_ack,
    .rx_frames, .tx_frames, .rx_overflows, .tx_overflows
  );

  // client port nets
  logic [PORTS-1:0]       cw_req, cw_ack, cr_req, cr_ack;
  logic [PORTS-1:0][31:0] cw_d;
  framing_e [PORTS-1:0]   cw_kfp;
  logic [31:0]            cr_data;

  llc_dispatcher #(.PORTS(PORTS)) u_disp (
    .clk, .reset,
    .cw_req, .cw_ack, .cw_d, .cw_kfp,
    .cr_req, .cr_ack, .cr_data,
    .dev_wi_req(wi_req), .dev_wi_ack(wi_ack), .dev_wi_d(wi_d), .dev_wi_kfp(wi_kfp),
    .dev_ri_req(ri_req), .dev_ri_ack(ri_ack), .dev_ri_return(ri_return),
    .dev_rb_req(rb_req), .dev_rb_ack(rb_ack), .dev_rb_return(rb_return),
    .dev_dr_req(dr_req), .dev_dr_ack(dr_ack),
    .rx_ready(port_rx_ready), .frames_forwarded, .frames_discarded, .tx_stalls
  );

  logic [2:0][31:0] jobs_done, seq_errors, fmt_errors;

  for (genvar a = 0; a < 3; a++) begin : g_filter
    photo_filter_app #(.BUF_WORDS(BUF_WORDS)) u_app (
      .clk, .reset,
      .wi_req(cw_req[a]), .wi_ack(cw_ack[a]), .wi_d(cw_d[a]), .wi_kfp(cw_kfp[a]),
      .ri_req(cr_req[a]), .ri_ack(cr_ack[a]), .ri_return(cr_data),
      .rx_led(rx_led[a]), .tx_led(tx_led[a]), .work_led(work_led[a]),
      .poll_led(poll_led[a]),
      .jobs_done(jobs_done[a]), .seq_errors(seq_errors[a]),
      .fmt_errors(fmt_errors[a])
    );
  end

  logic [NSTAT-1:0][31:0] status;
  assign status = {tx_overflows, rx_overflows,
                   seq_errors[2], seq_errors[1], seq_errors[0],
                   jobs_done[2], jobs_done[1], jobs_done[0],
                   frames_discarded, frames_forwarded, tx_frames, rx_frames};

  monitor_app #(.NSTAT(NSTAT)) u_mon (
    .clk, .reset,
    .status_in(status),
    .wi_req(cw_req[3]), .wi_ack(cw_ack[3]), .wi_d(cw_d[3]), .wi_kfp(cw_kfp[3]),
    .ri_req(cr_req[3]), .ri_ack(cr_ack[3]), .ri_return(cr_data),
    .requests(monitor_requests)
  );

endmodule
