// tb_reliable_layer: the reliability layer between a testbench buffer and
// behavioural lower-layer methods (a queue of words for ReadInt, a log of
// WriteInt words and framings, a DiscardRxFrame counter). Buffer of 8
// words, discard after read enabled.
// Checks: payload stored and length returned, sequence and protocol-id
// errors counted, overlength messages read fully but clamped, one discard
// per message, and the exact ArrayWrite word stream with framing and an
// incrementing sequence number.
module tb_reliable_layer;
  import kiwi_pkg::*;

  localparam int unsigned BW = 8;

  logic        clk = 1'b0, reset = 1'b1;
  logic        ar_req = 1'b0, ar_ack, aw_req = 1'b0, aw_ack;
  logic [31:0] ar_len, aw_len = '0;
  logic        buf_we;
  logic [2:0]  buf_waddr, buf_raddr;
  logic [31:0] buf_wdata, buf_rdata;
  logic        wi_req, wi_ack = 1'b0, ri_req, ri_ack = 1'b0, dr_req, dr_ack = 1'b0;
  logic [31:0] wi_d, ri_return = '0;
  framing_e    wi_kfp;
  logic [31:0] seq_errors, fmt_errors, rx_msgs, tx_msgs;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  reliable_layer #(.BUF_WORDS(BW), .DISCARD_AFTER_READ(1'b1)) dut (.*);

  logic [31:0] mem [BW];
  assign buf_rdata = mem[buf_raddr];
  always @(posedge clk) if (buf_we) mem[buf_waddr] <= buf_wdata;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------------------------------------- lower-layer models
  logic [31:0] rxq[$];
  logic [31:0] txw[$];
  framing_e    txk[$];
  int          discards = 0;

  always @(posedge clk) begin
    // ReadInt callee: answers a request after 2 cycles when data exists
    if (ri_req && !ri_ack && rxq.size() > 0) begin
      repeat (2) @(posedge clk);
      ri_return <= rxq.pop_front();
      ri_ack    <= 1'b1;
    end else if (!ri_req) ri_ack <= 1'b0;
  end
  always @(posedge clk) begin
    if (wi_req && !wi_ack) begin
      txw.push_back(wi_d); txk.push_back(wi_kfp);
      wi_ack <= 1'b1;
    end else if (!wi_req) wi_ack <= 1'b0;
  end
  always @(posedge clk) begin
    if (dr_req && !dr_ack) begin discards++; dr_ack <= 1'b1; end
    else if (!dr_req) dr_ack <= 1'b0;
  end

  task automatic array_read(output logic [31:0] n);
    @(negedge clk) ar_req = 1'b1;
    do @(posedge clk); while (!ar_ack);
    #1 n = ar_len;
    @(negedge clk) ar_req = 1'b0;
    do @(posedge clk); while (ar_ack);
  endtask
  task automatic array_write(input logic [31:0] n);
    @(negedge clk) begin aw_req = 1'b1; aw_len = n; end
    do @(posedge clk); while (!aw_ack);
    @(negedge clk) aw_req = 1'b0;
    do @(posedge clk); while (aw_ack);
  endtask

  task automatic push_msg(input logic [31:0] seq, input int n, input logic [31:0] endid,
                          input logic [31:0] base);
    rxq.push_back(PROTO_ID_START);
    rxq.push_back(seq);
    rxq.push_back(32'(n));
    for (int k = 0; k < n; k++) rxq.push_back(base + 32'(k * 3));
    rxq.push_back(endid);
  endtask

  logic [31:0] n;

  initial begin
    repeat (3) @(negedge clk);
    reset = 1'b0;

    // good message, seq 0
    push_msg(0, 5, PROTO_ID_END, 32'h100);
    array_read(n);
    check(n == 5, "ArrayRead length 5");
    for (int k = 0; k < 5; k++)
      check(mem[k] == 32'h100 + 32'(k * 3), $sformatf("stored word %0d", k));
    check(seq_errors == 0 && fmt_errors == 0, "no errors on good message");
    check(discards == 1, "frame discarded after read");

    // sequence jump (expects 1, gets 4), then in-sequence 5
    push_msg(4, 2, PROTO_ID_END, 32'h200);
    array_read(n);
    check(seq_errors == 1, "sequence error counted");
    push_msg(5, 2, PROTO_ID_END, 32'h300);
    array_read(n);
    check(seq_errors == 1, "resynchronised after sequence error");

    // bad end id
    push_msg(6, 1, 32'hDEAD_BEEF, 32'h400);
    array_read(n);
    check(fmt_errors == 1, "bad protocol id counted");

    // overlength: 10 words into an 8-word buffer
    push_msg(7, 10, PROTO_ID_END, 32'h500);
    array_read(n);
    check(n == BW, "overlength message clamped");
    check(rxq.size() == 0, "overlength message read to its end");
    check(mem[7] == 32'h500 + 32'd21, "last stored word of overlength message");
    check(fmt_errors == 2, "overlength counted");
    check(rx_msgs == 5 && discards == 5, "five messages, five discards");

    // ArrayWrite twice
    for (int k = 0; k < BW; k++) mem[k] = 32'hC000 + 32'(k);
    array_write(3);
    array_write(0);
    check(txw.size() == 7 + 4, $sformatf("word count %0d", txw.size()));
    if (txw.size() == 11) begin
      check(txw[0] == PROTO_ID_START && txk[0] == FR_START, "first word START id");
      check(txw[1] == 0 && txk[1] == FR_MID, "seq 0");
      check(txw[2] == 3 && txk[2] == FR_MID, "len 3");
      for (int k = 0; k < 3; k++)
        check(txw[3+k] == 32'hC000 + 32'(k) && txk[3+k] == FR_MID, "payload word");
      check(txw[6] == PROTO_ID_END && txk[6] == FR_END, "END id");
      check(txw[7] == PROTO_ID_START && txk[7] == FR_START, "second message start");
      check(txw[8] == 1, "seq incremented");
      check(txw[9] == 0, "empty message length");
      check(txw[10] == PROTO_ID_END && txk[10] == FR_END, "empty message end");
    end
    check(tx_msgs == 2, "two messages sent");

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
