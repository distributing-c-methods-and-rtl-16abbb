// kiwi_top: the two FPGA configurations side by side, each with its own
// Ethernet MAC LocalLink ports (the hard MAC itself is outside the RTL).
//   farm_*    kiwi_farm_fpga: dispatcher with three single-channel photo
//             filters and a monitor server sharing one Ethernet port.
//   single_*  kiwi_single_app_fpga: one three-channel photo filter alone
//             on its Ethernet port.
//   fact_*    factorial_circuit: the small example circuit, with its own
//             reset (which also loads n).
// The two FPGA configurations share only clock and reset. Sizes are the
// design's: 2048-byte receive and transmit buffers, 512-word work buffers,
// an 8-bit n and a 16-bit factorial.
module kiwi_top
  import kiwi_pkg::*;
(
  input  logic        clk,
  input  logic        reset,
  // shared-FPGA configuration
  output logic [7:0]  farm_tx_data,
  output logic        farm_tx_sof_n,
  output logic        farm_tx_eof_n,
  output logic        farm_tx_src_rdy_n,
  input  logic        farm_tx_dst_rdy_n,
  input  logic [7:0]  farm_rx_data,
  input  logic        farm_rx_sof_n,
  input  logic        farm_rx_eof_n,
  input  logic        farm_rx_src_rdy_n,
  output logic        farm_rx_dst_rdy_n,
  output logic [2:0]  farm_rx_led,
  output logic [2:0]  farm_tx_led,
  output logic [2:0]  farm_work_led,
  output logic [2:0]  farm_poll_led,
  output logic [3:0]  farm_port_rx_ready,
  output logic [31:0] farm_frames_forwarded,
  output logic [31:0] farm_frames_discarded,
  output logic [31:0] farm_tx_stalls,
  output logic [31:0] farm_monitor_requests,
  // single-application configuration
  output logic [7:0]  single_tx_data,
  output logic        single_tx_sof_n,
  output logic        single_tx_eof_n,
  output logic        single_tx_src_rdy_n,
  input  logic        single_tx_dst_rdy_n,
  input  logic [7:0]  single_rx_data,
  input  logic        single_rx_sof_n,
  input  logic        single_rx_eof_n,
  input  logic        single_rx_src_rdy_n,
  output logic        single_rx_dst_rdy_n,
  output logic        single_rx_led,
  output logic        single_tx_led,
  output logic        single_work_led,
  output logic        single_poll_led,
  output logic [31:0] single_jobs_done,
  output logic [31:0] single_seq_errors,
  output logic [31:0] single_rx_frames,
  output logic [31:0] single_tx_frames,
  // factorial example circuit
  input  logic        fact_reset,
  input  logic [7:0]  fact_n,
  output logic [15:0] fact_fac,
  output logic        fact_done
);

  kiwi_farm_fpga u_farm (
    .clk, .reset,
    .tx_data(farm_tx_data), .tx_sof_n(farm_tx_sof_n), .tx_eof_n(farm_tx_eof_n),
    .tx_src_rdy_n(farm_tx_src_rdy_n), .tx_dst_rdy_n(farm_tx_dst_rdy_n),
    .rx_data(farm_rx_data), .rx_sof_n(farm_rx_sof_n), .rx_eof_n(farm_rx_eof_n),
    .rx_src_rdy_n(farm_rx_src_rdy_n), .rx_dst_rdy_n(farm_rx_dst_rdy_n),
    .rx_led(farm_rx_led), .tx_led(farm_tx_led), .work_led(farm_work_led),
    .poll_led(farm_poll_led), .port_rx_ready(farm_port_rx_ready),
    .frames_forwarded(farm_frames_forwarded),
    .frames_discarded(farm_frames_discarded),
    .tx_stalls(farm_tx_stalls), .monitor_requests(farm_monitor_requests)
  );

  kiwi_single_app_fpga u_single (
    .clk, .reset,
    .tx_data(single_tx_data), .tx_sof_n(single_tx_sof_n),
    .tx_eof_n(single_tx_eof_n), .tx_src_rdy_n(single_tx_src_rdy_n),
    .tx_dst_rdy_n(single_tx_dst_rdy_n),
    .rx_data(single_rx_data), .rx_sof_n(single_rx_sof_n),
    .rx_eof_n(single_rx_eof_n), .rx_src_rdy_n(single_rx_src_rdy_n),
    .rx_dst_rdy_n(single_rx_dst_rdy_n),
    .rx_led(single_rx_led), .tx_led(single_tx_led),
    .work_led(single_work_led), .poll_led(single_poll_led),
    .jobs_done(single_jobs_done), .seq_errors(single_seq_errors),
    .rx_frames(single_rx_frames), .tx_frames(single_tx_frames)
  );

  factorial_circuit u_fact (
    .clk, .reset(fact_reset), .n(fact_n), .fac(fact_fac), .done(fact_done)
  );

endmodule
