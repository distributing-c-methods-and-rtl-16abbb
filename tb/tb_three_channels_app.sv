// tb_three_channels_app: the three-channel photo filter with a behavioural
// network device (ReadInt word queue, WriteInt log, DiscardRxFrame
// counter), 30-word buffer. Jobs of 9, 7 and 30 words; the 7-word job
// makes the last group run past len. A model of the work buffer and the
// three channels (word i goes to channel i mod 3) gives every expected
// result. Checks the reply words, one discard per message and jobs_done.
module tb_three_channels_app;
  import kiwi_pkg::*;

  localparam int unsigned BW = 30;

  logic        clk = 1'b0, reset = 1'b1;
  logic        wi_req, wi_ack = 1'b0, ri_req, ri_ack = 1'b0, dr_req, dr_ack = 1'b0;
  logic [31:0] wi_d, ri_return = '0;
  framing_e    wi_kfp;
  logic        rx_led, tx_led, work_led, poll_led;
  logic [31:0] jobs_done, seq_errors, fmt_errors;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  three_channels_app #(.BUF_WORDS(BW)) dut (.*);

  int work_cycles = 0;
  always @(posedge clk) if (!reset && work_led) work_cycles++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  logic [31:0] rxq[$];
  logic [31:0] txw[$];
  framing_e    txk[$];
  int          discards = 0;
  always @(posedge clk) begin
    if (ri_req && !ri_ack && rxq.size() > 0) begin
      ri_return <= rxq.pop_front();
      ri_ack    <= 1'b1;
    end else if (!ri_req) ri_ack <= 1'b0;
    if (wi_req && !wi_ack) begin
      txw.push_back(wi_d); txk.push_back(wi_kfp);
      wi_ack <= 1'b1;
    end else if (!wi_req) wi_ack <= 1'b0;
    if (!reset && dr_req && !dr_ack) begin discards++; dr_ack <= 1'b1; end
    else if (!dr_req) dr_ack <= 1'b0;
  end

  // model: three channels and the work buffer
  int md [3][9];
  int mp [3], mm [3];
  int mbuf [BW];
  int kc [9] = '{1, -2, 3, -4, 5, -4, 3, -2, 1};
  function automatic int conv(int ch, int x);
    int s = 0;
    mp[ch] = (mp[ch] == 8) ? 0 : mp[ch] + 1;
    if (mp[ch] > mm[ch]) mm[ch] = mp[ch];
    md[ch][mp[ch]] = x;
    for (int t = 0; t < 9; t++)
      if (t <= mm[ch] && (mp[ch] - t + 9) % 9 <= mm[ch])
        s += md[ch][t] * kc[(mp[ch] - t + 9) % 9];
    return s;
  endfunction

  task automatic job(input int seq, input int n);
    for (int c = 0; c < 3; c++) begin mp[c] = 0; mm[c] = 0; end
    txw = {}; txk = {};
    rxq.push_back(PROTO_ID_START); rxq.push_back(32'(seq)); rxq.push_back(32'(n));
    for (int k = 0; k < n; k++) begin
      mbuf[k] = $urandom_range(0, 1000) - 500;
      rxq.push_back(32'(mbuf[k]));
    end
    rxq.push_back(PROTO_ID_END);
    for (int i = 0; i < n; i += 3)
      for (int c = 0; c < 3; c++)
        if (i + c < BW) mbuf[i+c] = conv(c, mbuf[i+c]);
    wait (jobs_done == 32'(seq + 1));
    check(txw.size() == n + 4, $sformatf("reply of %0d words", txw.size()));
    if (txw.size() == n + 4) begin
      check(txw[0] == PROTO_ID_START && txk[0] == FR_START, "reply start");
      check(txw[1] == 32'(seq) && txw[2] == 32'(n), "reply sequence and length");
      for (int k = 0; k < n; k++)
        check(txw[3+k] == 32'(mbuf[k]),
              $sformatf("word %0d: %0d expected %0d", k, $signed(txw[3+k]), mbuf[k]));
      check(txw[n+3] == PROTO_ID_END && txk[n+3] == FR_END, "reply end");
    end
    check(discards == seq + 1, "receive frame freed once per message");
  endtask

  initial begin
    for (int c = 0; c < 3; c++) for (int t = 0; t < 9; t++) md[c][t] = 0;
    for (int k = 0; k < BW; k++) mbuf[k] = 0;
    repeat (3) @(negedge clk);
    reset = 1'b0;
    job(0, 9);
    job(1, 7);
    work_cycles = 0;
    job(2, BW);
    $display("single-threaded work phase: %0d cycles", work_cycles);
    check(seq_errors == 0 && fmt_errors == 0, "no errors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
