// tb_kiwi_single_app_fpga: end-to-end test of the single-application FPGA
// (network device and three-channel photo filter) at its default sizes,
// fed by a model of a client workstation over LocalLink. Two jobs of 30
// and 10 interleaved words; each reply is checked for swapped MAC
// addresses, framing, sequence number and every filtered word against a
// model of the three channels and the work buffer. The 10-word job makes
// the last group of three run past len; transmit back-pressure is random.
module tb_kiwi_single_app_fpga;
  import kiwi_pkg::*;

  logic clk = 1'b0, reset = 1'b1;
  always #5 clk = ~clk;

  logic [7:0]  tx_data;
  logic        tx_sof_n, tx_eof_n, tx_src_rdy_n, tx_dst_rdy_n = 1'b0;
  logic [7:0]  rx_data = '0;
  logic        rx_sof_n = 1'b1, rx_eof_n = 1'b1, rx_src_rdy_n = 1'b1, rx_dst_rdy_n;
  logic        rx_led, tx_led, work_led, poll_led;
  logic [31:0] jobs_done, seq_errors, rx_frames, tx_frames;

  kiwi_single_app_fpga dut (.*);

  int checks = 0, failures = 0;
  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endfunction

  typedef byte unsigned bq_t[$];
  typedef logic [31:0]  wq_t[$];

  localparam logic [47:0] FPGA_MAC   = 48'h02_00_00_00_00_01;
  localparam logic [47:0] CLIENT_MAC = 48'h02_00_00_00_00_AA;

  function automatic bq_t make_frame(input wq_t words);
    bq_t b;
    for (int k = 5; k >= 0; k--) b.push_back(FPGA_MAC[8*k +: 8]);
    for (int k = 5; k >= 0; k--) b.push_back(CLIENT_MAC[8*k +: 8]);
    foreach (words[w]) for (int k = 3; k >= 0; k--) b.push_back(words[w][8*k +: 8]);
    return b;
  endfunction

  function automatic wq_t message(input int seq, input wq_t data);
    wq_t m;
    m = {PROTO_ID_START, 32'(seq), 32'(data.size())};
    foreach (data[k]) m.push_back(data[k]);
    m.push_back(PROTO_ID_END);
    return m;
  endfunction

  // ------------------------------------------------ convolver model
  typedef struct { int d [9]; int p; int m; } chan_t;
  function automatic int conv(inout chan_t c, input int x);
    int s = 0;
    int kc [9] = '{1, -2, 3, -4, 5, -4, 3, -2, 1};
    c.p = (c.p == 8) ? 0 : c.p + 1;
    if (c.p > c.m) c.m = c.p;
    c.d[c.p] = x;
    for (int t = 0; t < 9; t++)
      if (t <= c.m && (c.p - t + 9) % 9 <= c.m) s += c.d[t] * kc[(c.p - t + 9) % 9];
    return s;
  endfunction
  chan_t sch [3];      // single-app channels
  int    sbuf [512];   // single-app work buffer model

  // ------------------------------------------------ mechanism counters
  int n_backpressure = 0, n_past_len = 0;

  // ------------------------------------------------ LocalLink sources
  task automatic send_single(input bq_t b);
    for (int n = 0; n < b.size(); n++) begin
      @(negedge clk);
      rx_data = b[n]; rx_src_rdy_n = 1'b0;
      rx_sof_n = (n != 0); rx_eof_n = (n != b.size() - 1);
      do @(posedge clk); while (rx_dst_rdy_n);
    end
    @(negedge clk) begin rx_src_rdy_n = 1'b1; rx_sof_n = 1'b1; rx_eof_n = 1'b1; end
  endtask

  // ------------------------------------------------ LocalLink sinks
  bq_t scur;
  bq_t sfr[$];
  always @(posedge clk) begin
    if (!reset && !tx_src_rdy_n && tx_dst_rdy_n) n_backpressure++;
    if (!reset && !tx_src_rdy_n && !tx_dst_rdy_n) begin
      scur.push_back(tx_data);
      if (!tx_eof_n) begin sfr.push_back(scur); scur = {}; end
    end
  end
  always @(negedge clk) begin
    tx_dst_rdy_n = ($urandom_range(0, 3) == 0);
  end

  // split a reply frame: check the MAC swap, return its words
  function automatic wq_t reply_words(input bq_t b, input string who);
    wq_t w;
    logic [47:0] d, s;
    for (int k = 0; k < 6; k++) begin d = {d[39:0], b[k]}; s = {s[39:0], b[6+k]}; end
    check(d == CLIENT_MAC && s == FPGA_MAC, {who, ": MAC addresses swapped"});
    for (int k = 12; k + 3 < b.size(); k += 4) w.push_back({b[k], b[k+1], b[k+2], b[k+3]});
    return w;
  endfunction

  // check a reliability message against expected payload
  task automatic check_msg(input wq_t w, input int off, input int seq, input wq_t exp_d,
                           input string who);
    check(w.size() == off + exp_d.size() + 4, $sformatf("%s: %0d words", who, w.size()));
    if (w.size() != off + exp_d.size() + 4) return;
    check(w[off] == PROTO_ID_START && w[off+1] == 32'(seq) &&
          w[off+2] == 32'(exp_d.size()), {who, ": header words"});
    foreach (exp_d[k])
      check(w[off+3+k] == exp_d[k], $sformatf("%s: word %0d = %0d expected %0d",
                                              who, k, $signed(w[off+3+k]), $signed(exp_d[k])));
    check(w[w.size()-1] == PROTO_ID_END, {who, ": end id"});
  endtask

  // ------------------------------------------------ single-app scenario
  bit single_done = 1'b0;

  task automatic single_job(input int seq, input int n);
    wq_t data, exp_d, w;
    for (int c = 0; c < 3; c++) begin sch[c].p = 0; sch[c].m = 0; end
    for (int k = 0; k < n; k++) begin
      sbuf[k] = $urandom_range(0, 2000) - 1000;
      data.push_back(32'(sbuf[k]));
    end
    for (int i = 0; i < n; i += 3)
      for (int c = 0; c < 3; c++) begin
        if (i + c >= n) n_past_len++;
        sbuf[i+c] = conv(sch[c], sbuf[i+c]);
      end
    for (int k = 0; k < n; k++) exp_d.push_back(32'(sbuf[k]));
    send_single(make_frame(message(seq, data)));
    wait (sfr.size() == seq + 1);
    w = reply_words(sfr[seq], "single reply");
    check_msg(w, 0, seq, exp_d, $sformatf("single job %0d", seq));
  endtask

  task automatic single_scenario();
    for (int c = 0; c < 3; c++) sch[c].d = '{default: 0};
    for (int k = 0; k < 512; k++) sbuf[k] = 0;
    single_job(0, 30);
    single_job(1, 10);
    repeat (10) @(posedge clk);
    check(jobs_done == 2 && seq_errors == 0, "single app: two jobs, no errors");
    check(rx_frames == 2 && tx_frames == 2, "single app frame counts");
    single_done = 1'b1;
  endtask

  initial begin
    repeat (4) @(negedge clk);
    reset = 1'b0;
    single_scenario();
    check(n_backpressure > 0, "mechanism: transmit back-pressure");
    check(n_past_len > 0, "mechanism: three-channel group past len");
    $display("mechanisms: backpressure=%0d past_len=%0d", n_backpressure, n_past_len);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog (single_done=%0d)", single_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
