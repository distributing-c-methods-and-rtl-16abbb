// tb_llc_dispatcher: the dispatcher with four client ports between a
// behavioural network device (frames as word lists behind RxBytes,
// ReadInt and DiscardRxFrame; a log of WriteInt words) and testbench
// clients.
// Receive checks: a frame reaches only the addressed port, other ports'
// reads block meanwhile, the ready flag clears after the last word, junk
// words before the LLC header are skipped, frames for unregistered ports
// and frames without a header are discarded, every frame is freed once.
// Transmit checks: the LLC header with the port number opens each frame,
// a second client's start waits for the first one's END (stall counted),
// and the words of the two frames never interleave.
module tb_llc_dispatcher;
  import kiwi_pkg::*;

  localparam int unsigned P = 4;

  logic                clk = 1'b0, reset = 1'b1;
  logic [P-1:0]        cw_req = '0, cw_ack, cr_req = '0, cr_ack;
  logic [P-1:0][31:0]  cw_d = '0;
  framing_e [P-1:0]    cw_kfp = {P{FR_MID}};
  logic [31:0]         cr_data;
  logic                dev_wi_req, dev_wi_ack = 1'b0, dev_ri_req, dev_ri_ack = 1'b0;
  logic                dev_rb_req, dev_rb_ack = 1'b0, dev_dr_req, dev_dr_ack = 1'b0;
  logic [31:0]         dev_wi_d, dev_ri_return = '0, dev_rb_return = '0;
  framing_e            dev_wi_kfp;
  logic [P-1:0]        rx_ready;
  logic [31:0]         frames_forwarded, frames_discarded, tx_stalls;
  int                  checks = 0, failures = 0;

  always #5 clk = ~clk;

  llc_dispatcher #(.PORTS(P)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ------------------------------------------------ device model
  typedef logic [31:0] wq_t[$];
  wq_t         frames[$];
  logic [31:0] cur[$];
  bit          have = 1'b0;
  int          discards = 0;
  logic [31:0] txw[$];
  framing_e    txk[$];

  always @(posedge clk) begin
    if (!have && frames.size() > 0) begin cur = frames.pop_front(); have = 1'b1; end
    if (dev_rb_req && !dev_rb_ack && have) begin
      dev_rb_return <= 32'(12 + 4 * cur.size());
      dev_rb_ack    <= 1'b1;
    end else if (!dev_rb_req) dev_rb_ack <= 1'b0;
    if (dev_ri_req && !dev_ri_ack && have) begin
      dev_ri_return <= (cur.size() > 0) ? cur.pop_front() : 32'h0;
      dev_ri_ack    <= 1'b1;
    end else if (!dev_ri_req) dev_ri_ack <= 1'b0;
    if (dev_dr_req && !dev_dr_ack) begin
      discards++; have = 1'b0; cur = {};
      dev_dr_ack <= 1'b1;
    end else if (!dev_dr_req) dev_dr_ack <= 1'b0;
    if (dev_wi_req && !dev_wi_ack) begin
      txw.push_back(dev_wi_d); txk.push_back(dev_wi_kfp);
      dev_wi_ack <= 1'b1;
    end else if (!dev_wi_req) dev_wi_ack <= 1'b0;
  end

  // ------------------------------------------------ client calls
  task automatic client_read(input int p, output logic [31:0] v);
    @(negedge clk) cr_req[p] = 1'b1;
    do @(posedge clk); while (!cr_ack[p]);
    #1 v = cr_data;
    @(negedge clk) cr_req[p] = 1'b0;
    do @(posedge clk); while (cr_ack[p]);
  endtask
  task automatic client_write(input int p, input logic [31:0] d, input framing_e k);
    @(negedge clk) begin cw_req[p] = 1'b1; cw_d[p] = d; cw_kfp[p] = k; end
    do @(posedge clk); while (!cw_ack[p]);
    @(negedge clk) cw_req[p] = 1'b0;
    do @(posedge clk); while (cw_ack[p]);
  endtask

  function automatic logic [31:0] hdr(input int p);
    return {LLC_HEADER_CONST, 8'h00, 8'(p)};
  endfunction

  logic [31:0] v;
  int          blocked_acks = 0;

  initial begin
    repeat (3) @(negedge clk);
    reset = 1'b0;

    // frame for port 1 with 3 words; port 0 tries to read at the same time
    frames.push_back('{32'd3, hdr(1), 32'hA1, 32'hA2, 32'hA3});
    fork
      begin
        @(negedge clk) cr_req[0] = 1'b1;
        repeat (200) @(posedge clk) if (cr_ack[0]) blocked_acks++;
      end
      begin
        for (int k = 0; k < 3; k++) begin
          client_read(1, v);
          check(v == 32'hA1 + 32'(k), $sformatf("port 1 word %0d = %h", k, v));
          if (k < 2) check(rx_ready[1], "ready stays up until the last word");
        end
        @(negedge clk);
        check(!rx_ready[1], "ready cleared after the last word");
      end
    join
    check(blocked_acks == 0, "other port blocked while port 1 owns the frame");
    check(discards == 1, "frame freed after the client read it");

    // frame for port 0 with junk before the header: the waiting reader gets it
    frames.push_back('{32'd2, 32'h1234_5678, 32'hFFFF_0000, hdr(0), 32'hB1, 32'hB2});
    do @(posedge clk); while (!cr_ack[0]);
    #1 check(cr_data == 32'hB1, "junk skipped, port 0 word 0");
    @(negedge clk) cr_req[0] = 1'b0;
    do @(posedge clk); while (cr_ack[0]);
    client_read(0, v);
    check(v == 32'hB2, "port 0 word 1");
    repeat (10) @(posedge clk);
    check(frames_forwarded == 2, "two frames forwarded");

    // unregistered port and header-less frames
    frames.push_back('{32'd1, hdr(9), 32'hC1});
    frames.push_back('{32'd1, 32'h1111_1111, 32'h2222_2222});
    repeat (100) @(posedge clk);
    check(frames_discarded == 2, $sformatf("two frames discarded (%0d)", frames_discarded));
    check(discards == 4, "every frame freed");
    check(rx_ready == '0, "no port readied by discarded frames");

    // transmit: port 2 opens a frame, port 0 starts meanwhile and must wait
    fork
      begin
        client_write(2, 32'hD0, FR_START);
        repeat (5) @(posedge clk);
        client_write(2, 32'hD1, FR_MID);
        client_write(2, 32'hD2, FR_END);
      end
      begin
        repeat (3) @(posedge clk);
        client_write(0, 32'hE0, FR_START);
        client_write(0, 32'hE1, FR_END);
      end
    join
    begin
      logic [31:0] ew[$];
      framing_e    ek[$];
      ew = '{hdr(2), 32'hD0, 32'hD1, 32'hD2, hdr(0), 32'hE0, 32'hE1};
      ek = '{FR_START, FR_MID, FR_MID, FR_END, FR_START, FR_MID, FR_END};
      check(txw.size() == ew.size(), $sformatf("device writes %0d", txw.size()));
      for (int k = 0; k < ew.size() && k < txw.size(); k++)
        check(txw[k] == ew[k] && txk[k] == ek[k],
              $sformatf("device write %0d = %h/%0d", k, txw[k], txk[k]));
    end
    check(tx_stalls >= 1, "the second start stalled on the mutex");

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
