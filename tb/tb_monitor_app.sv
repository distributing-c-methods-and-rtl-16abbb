// tb_monitor_app: the monitor server with a behavioural lower layer.
// Sends two empty request messages and checks that each reply carries the
// status words as they stood when the request completed (the inputs keep
// changing afterwards), framed with protocol ids and sequence numbers.
module tb_monitor_app;
  import kiwi_pkg::*;

  localparam int unsigned NS = 6;

  logic                clk = 1'b0, reset = 1'b1;
  logic [NS-1:0][31:0] status_in = '0;
  logic                wi_req, wi_ack = 1'b0, ri_req, ri_ack = 1'b0;
  logic [31:0]         wi_d, ri_return = '0, requests;
  framing_e            wi_kfp;
  int                  checks = 0, failures = 0;

  always #5 clk = ~clk;

  monitor_app #(.NSTAT(NS)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  logic [31:0] rxq[$];
  logic [31:0] txw[$];
  framing_e    txk[$];
  logic [NS-1:0][31:0] at_end;
  always @(posedge clk) begin
    if (ri_req && !ri_ack && rxq.size() > 0) begin
      ri_return <= rxq.pop_front();
      ri_ack    <= 1'b1;
      if (rxq.size() == 0) at_end = status_in;   // last word of the request
    end else if (!ri_req) ri_ack <= 1'b0;
    if (wi_req && !wi_ack) begin
      txw.push_back(wi_d); txk.push_back(wi_kfp);
      wi_ack <= 1'b1;
    end else if (!wi_req) wi_ack <= 1'b0;
  end
  // status counters that keep moving
  always @(posedge clk)
    for (int k = 0; k < NS; k++) status_in[k] <= status_in[k] + 32'(k + 1);

  task automatic request(input int seq);
    txw = {}; txk = {};
    rxq = '{PROTO_ID_START, 32'(seq), 32'd0, PROTO_ID_END};
    wait (requests == 32'(seq + 1));
    check(txw.size() == NS + 4, $sformatf("reply of %0d words", txw.size()));
    if (txw.size() == NS + 4) begin
      check(txw[0] == PROTO_ID_START && txk[0] == FR_START, "reply start");
      check(txw[1] == 32'(seq), "reply sequence");
      check(txw[2] == NS, "reply length");
      for (int k = 0; k < NS; k++)
        // snapshot is taken one cycle after the last word is handed over
        check(txw[3+k] >= at_end[k] && txw[3+k] <= at_end[k] + 32'(4 * (k + 1)) &&
              txw[3+k] % 32'(k + 1) == 0,
              $sformatf("status %0d = %0d near %0d", k, txw[3+k], at_end[k]));
      check(txw[NS+3] == PROTO_ID_END && txk[NS+3] == FR_END, "reply end");
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    reset = 1'b0;
    request(0);
    repeat (20) @(posedge clk);
    request(1);
    check(txw.size() == NS + 4 && txw[3] != 0, "second report differs from reset value");
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
