// kiwi_single_app_fpga: one FPGA hosting one application server, the
// three-channel photo filter, directly on the network device (no
// dispatcher). The application's reliability layer calls the device's
// WriteInt, ReadInt and DiscardRxFrame methods itself.
//
// Received frame layout (bytes): 0-5 destination MAC, 6-11 source MAC,
// then the reliability-layer message: PROTO_ID_START, sequence number,
// word count len, len data words (channel samples interleaved y,u,v),
// PROTO_ID_END. The reply carries the filtered words in the same format,
// addressed back to the sender. Words are big-endian.
//
// Follows the design's single-application configuration; the wiring is
// straightforward.
module kiwi_single_app_fpga
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
  output logic        rx_led,
  output logic        tx_led,
  output logic        work_led,
  output logic        poll_led,
  output logic [31:0] jobs_done,
  output logic [31:0] seq_errors,
  output logic [31:0] rx_frames,
  output logic [31:0] tx_frames
);

  logic        wi_req, wi_ack, ri_req, ri_ack, rb_ack, dr_req, dr_ack;
  logic [31:0] wi_d, ri_return, rb_return, rx_overflows, tx_overflows;
  logic [31:0] fmt_errors;
  framing_e    wi_kfp;

  ether_link #(.RX_BYTES(RX_BYTES), .TX_BYTES(TX_BYTES)) u_eth (
    .clk, .reset,
    .tx_data, .tx_sof_n, .tx_eof_n, .tx_src_rdy_n, .tx_dst_rdy_n,
    .rx_data, .rx_sof_n, .rx_eof_n, .rx_src_rdy_n, .rx_dst_rdy_n,
    .wi_req, .wi_ack, .wi_d, .wi_kfp,
    .ri_req, .ri_ack, .ri_return,
    .rb_req(1'b0), .rb_ack, .rb_return,
    .dr_req, .dr_ack,
    .rx_frames, .tx_frames, .rx_overflows, .tx_overflows
  );

  three_channels_app #(.BUF_WORDS(BUF_WORDS)) u_app (
    .clk, .reset,
    .wi_req, .wi_ack, .wi_d, .wi_kfp,
    .ri_req, .ri_ack, .ri_return,
    .dr_req, .dr_ack,
    .rx_led, .tx_led, .work_led, .poll_led,
    .jobs_done, .seq_errors, .fmt_errors
  );

endmodule
