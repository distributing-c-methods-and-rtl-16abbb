// tb_photo_filter_app: one photo filter server with a behavioural lower
// layer (ReadInt from a word queue, WriteInt log). Sends three work
// messages of different lengths (sizes reduced to a 32-word buffer), and
// checks each reply: framing words, sequence numbers, length, and every
// filtered word against a software model of the convolver (whose sample
// store survives a channel reset). Also checks jobs_done, the indicators
// and that each word costs 14 cycles of work.
module tb_photo_filter_app;
  import kiwi_pkg::*;

  localparam int unsigned BW = 32;

  logic        clk = 1'b0, reset = 1'b1;
  logic        wi_req, wi_ack = 1'b0, ri_req, ri_ack = 1'b0;
  logic [31:0] wi_d, ri_return = '0;
  framing_e    wi_kfp;
  logic        rx_led, tx_led, work_led, poll_led;
  logic [31:0] jobs_done, seq_errors, fmt_errors;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  photo_filter_app #(.BUF_WORDS(BW)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  logic [31:0] rxq[$];
  logic [31:0] txw[$];
  framing_e    txk[$];
  always @(posedge clk) begin
    if (ri_req && !ri_ack && rxq.size() > 0) begin
      ri_return <= rxq.pop_front();
      ri_ack    <= 1'b1;
    end else if (!ri_req) ri_ack <= 1'b0;
    if (wi_req && !wi_ack) begin
      txw.push_back(wi_d); txk.push_back(wi_kfp);
      wi_ack <= 1'b1;
    end else if (!wi_req) wi_ack <= 1'b0;
  end

  // convolver model
  int mdata [9];
  int mptr = 0, mmax = 0;
  int kc [9] = '{1, -2, 3, -4, 5, -4, 3, -2, 1};
  function automatic int conv(int x);
    int s = 0;
    mptr = (mptr == 8) ? 0 : mptr + 1;
    if (mptr > mmax) mmax = mptr;
    mdata[mptr] = x;
    for (int t = 0; t < 9; t++)
      if (t <= mmax && (mptr - t + 9) % 9 <= mmax) s += mdata[t] * kc[(mptr - t + 9) % 9];
    return s;
  endfunction

  int work_cycles = 0;
  always @(posedge clk) if (work_led) work_cycles++;

  task automatic job(input int seq, input int n);
    int exp_v [$];
    int c0;
    mptr = 0; mmax = 0;
    txw = {}; txk = {};
    rxq.push_back(PROTO_ID_START); rxq.push_back(32'(seq)); rxq.push_back(32'(n));
    for (int k = 0; k < n; k++) begin
      int x;
      x = $urandom_range(0, 255);
      rxq.push_back(32'(x));
      exp_v.push_back(conv(x));
    end
    rxq.push_back(PROTO_ID_END);
    c0 = work_cycles;
    wait (jobs_done == 32'(seq + 1));
    check(txw.size() == n + 4, $sformatf("reply of %0d words", txw.size()));
    if (txw.size() == n + 4) begin
      check(txw[0] == PROTO_ID_START && txk[0] == FR_START, "reply start");
      check(txw[1] == 32'(seq), "reply sequence number");
      check(txw[2] == 32'(n), "reply length");
      for (int k = 0; k < n; k++)
        check(txw[3+k] == 32'(exp_v[k]),
              $sformatf("word %0d: %0d expected %0d", k, $signed(txw[3+k]), exp_v[k]));
      check(txw[n+3] == PROTO_ID_END && txk[n+3] == FR_END, "reply end");
    end
    check(work_cycles - c0 == 14 * n + 2,
          $sformatf("work phase %0d cycles for %0d words", work_cycles - c0, n));
  endtask

  initial begin
    for (int t = 0; t < 9; t++) mdata[t] = 0;
    repeat (3) @(negedge clk);
    reset = 1'b0;
    repeat (2) @(posedge clk);
    check(rx_led && !work_led && !tx_led, "waiting for work");
    job(0, 5);
    job(1, 20);
    job(2, BW);
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
