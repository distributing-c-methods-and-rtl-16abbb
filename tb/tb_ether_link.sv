// tb_ether_link: exercises the network device on its own with small
// buffers (64 bytes). A LocalLink source feeds frames into the receive
// side; the four methods are called through their four-phase handshakes;
// a LocalLink sink with random back-pressure collects transmitted frames.
// Checks: RxBytes, big-endian ReadInt words from byte 12 and their 4-cycle
// cost, zero bytes past the frame end, receive hold-off until
// DiscardRxFrame, transmitted frames with swapped MAC addresses, SOF/EOF
// placement, and receive and transmit overflow counting.
module tb_ether_link;
  import kiwi_pkg::*;

  localparam int unsigned RXB = 64, TXB = 64;

  logic        clk = 1'b0, reset = 1'b1;
  logic [7:0]  tx_data;
  logic        tx_sof_n, tx_eof_n, tx_src_rdy_n, tx_dst_rdy_n = 1'b0;
  logic [7:0]  rx_data = '0;
  logic        rx_sof_n = 1'b1, rx_eof_n = 1'b1, rx_src_rdy_n = 1'b1, rx_dst_rdy_n;
  logic        wi_req = 1'b0, wi_ack;
  logic [31:0] wi_d = '0;
  framing_e    wi_kfp = FR_MID;
  logic        ri_req = 1'b0, ri_ack, rb_req = 1'b0, rb_ack, dr_req = 1'b0, dr_ack;
  logic [31:0] ri_return, rb_return;
  logic [31:0] rx_frames, tx_frames, rx_overflows, tx_overflows;
  int          checks = 0, failures = 0;
  bit          backpressure = 1'b0;

  always #5 clk = ~clk;

  ether_link #(.RX_BYTES(RXB), .TX_BYTES(TXB)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ------------------------------------------------ LocalLink source
  task automatic send_frame(input byte unsigned b[$]);
    for (int n = 0; n < b.size(); n++) begin
      @(negedge clk);
      rx_data = b[n]; rx_src_rdy_n = 1'b0;
      rx_sof_n = (n != 0); rx_eof_n = (n != b.size() - 1);
      do @(posedge clk); while (rx_dst_rdy_n);
    end
    @(negedge clk) rx_src_rdy_n = 1'b1; rx_sof_n = 1'b1; rx_eof_n = 1'b1;
  endtask

  // ------------------------------------------------ LocalLink sink
  byte unsigned cur[$];
  byte unsigned frames[$][$];
  int           sof_errs = 0;
  always @(posedge clk) begin
    if (!reset && !tx_src_rdy_n && !tx_dst_rdy_n) begin
      if ((cur.size() == 0) != !tx_sof_n) sof_errs++;
      cur.push_back(tx_data);
      if (!tx_eof_n) begin frames.push_back(cur); cur = {}; end
    end
  end
  always @(negedge clk) tx_dst_rdy_n = backpressure ? ($urandom_range(0, 2) == 0) : 1'b0;

  // ------------------------------------------------ method calls
  task automatic write_int(input logic [31:0] d, input framing_e k);
    @(negedge clk); wi_d = d; wi_kfp = k; wi_req = 1'b1;
    do @(posedge clk); while (!wi_ack);
    @(negedge clk) wi_req = 1'b0;
    do @(posedge clk); while (wi_ack);
  endtask
  task automatic read_int(output logic [31:0] v, output int cyc);
    @(negedge clk); ri_req = 1'b1; cyc = 0;
    do begin @(posedge clk); #1; cyc++; end while (!ri_ack);
    v = ri_return;
    @(negedge clk) ri_req = 1'b0;
    do @(posedge clk); while (ri_ack);
  endtask
  task automatic rx_bytes(output logic [31:0] v);
    @(negedge clk); rb_req = 1'b1;
    do @(posedge clk); while (!rb_ack);
    #1 v = rb_return;
    @(negedge clk) rb_req = 1'b0;
    do @(posedge clk); while (rb_ack);
  endtask
  task automatic discard();
    @(negedge clk); dr_req = 1'b1;
    do @(posedge clk); while (!dr_ack);
    @(negedge clk) dr_req = 1'b0;
    do @(posedge clk); while (dr_ack);
  endtask

  byte unsigned f[$];
  logic [31:0]  v;
  int           cyc;

  initial begin
    repeat (3) @(negedge clk);
    reset = 1'b0;
    @(negedge clk);
    check(!rx_dst_rdy_n, "receiver ready after reset");

    // frame 1: dest 02.., src 0A.., 5 payload words
    f = {};
    for (int n = 0; n < 6; n++) f.push_back(8'h02 + n);
    for (int n = 0; n < 6; n++) f.push_back(8'hA0 + n);
    for (int n = 0; n < 20; n++) f.push_back(8'(n * 7 + 1));
    send_frame(f);
    @(negedge clk);
    check(rx_dst_rdy_n, "receiver held off while a frame is held");
    check(rx_frames == 1, "rx frame count 1");
    rx_bytes(v);
    check(v == 32, $sformatf("RxBytes %0d", v));
    for (int w = 0; w < 5; w++) begin
      read_int(v, cyc);
      check(v == {f[12+4*w], f[13+4*w], f[14+4*w], f[15+4*w]},
            $sformatf("ReadInt word %0d = %h", w, v));
      check(cyc == 5, $sformatf("ReadInt took %0d cycles", cyc));
    end
    read_int(v, cyc);
    check(v == 0, "ReadInt past end of frame reads zero");

    // transmit: START, 2 x MID, END with back-pressure
    backpressure = 1'b1;
    write_int(32'h1122_3344, FR_START);
    write_int(32'h5566_7788, FR_MID);
    write_int(32'h99AA_BBCC, FR_MID);
    check(frames.size() == 0, "nothing sent before END");
    write_int(32'hDDEE_FF00, FR_END);
    check(frames.size() == 1, "one frame sent after END");
    check(tx_frames == 1, "tx frame count");
    if (frames.size() == 1) begin
      byte unsigned t[$];
      byte unsigned e[$];
      t = frames[0];
      for (int n = 6; n < 12; n++) e.push_back(f[n]);
      for (int n = 0; n < 6; n++) e.push_back(f[n]);
      e = {e, 8'h11, 8'h22, 8'h33, 8'h44, 8'h55, 8'h66, 8'h77, 8'h88,
              8'h99, 8'hAA, 8'hBB, 8'hCC, 8'hDD, 8'hEE, 8'hFF, 8'h00};
      check(t.size() == e.size(), $sformatf("tx frame length %0d", t.size()));
      for (int n = 0; n < e.size() && n < t.size(); n++)
        check(t[n] == e[n], $sformatf("tx byte %0d = %h expected %h", n, t[n], e[n]));
    end
    check(sof_errs == 0, "SOF marks exactly the first byte");

    // discard, then a second frame is accepted
    discard();
    @(negedge clk);
    check(!rx_dst_rdy_n, "receiver ready after discard");
    f = {};
    for (int n = 0; n < 16; n++) f.push_back(8'(8'h30 + n));
    send_frame(f);
    read_int(v, cyc);
    check(v == 32'h3C3D3E3F, "ReadInt after discard starts at byte 12");
    discard();

    // receive overflow: 80-byte frame into a 64-byte buffer
    f = {};
    for (int n = 0; n < 80; n++) f.push_back(8'(n));
    send_frame(f);
    rx_bytes(v);
    check(v == RXB, $sformatf("RxBytes clamps to buffer size (%0d)", v));
    check(rx_overflows == 1, "rx overflow counted once");
    discard();

    // transmit overflow: 64 + 8 bytes written
    write_int(32'h0, FR_START);
    for (int n = 0; n < 15; n++) write_int(32'(n), FR_MID);
    write_int(32'hFFFF_FFFF, FR_END);
    check(tx_overflows == 1, "tx overflow counted once");
    check(frames.size() == 2 && frames[1].size() == TXB, "overflowed frame is buffer-sized");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
