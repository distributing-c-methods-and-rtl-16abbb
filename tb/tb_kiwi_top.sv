// tb_kiwi_top: end-to-end test of both FPGA configurations at full size
// (2048-byte frame buffers, 512-word work buffers), each fed by a model
// of a client workstation over its LocalLink ports.
//
// Shared-FPGA side: work messages to filter ports 0, 1 and 2, a frame for
// an unregistered port, an oversize frame (2100 bytes) and finally a
// monitor request. Every reply must come back with swapped MAC addresses,
// the LLC header of the answering port, correct framing and sequence
// numbers, and filtered words equal to a software model of each channel.
// The monitor report must give the exact frame, job, error and overflow
// counts. Single-application side: two jobs for the three-channel filter,
// checked the same way.
// Mechanisms that must each happen at least once: frame forwarded to a
// port, frame discarded, transmit mutex stall, receiver hold-off (a frame
// waiting while the buffer is full), transmit back-pressure, receive
// overflow, monitor report, and a three-channel group running past len.
// Factorial circuit: 5! = 120 after 4 cycles and 8! = 40320 after 7.
module tb_kiwi_top;
  import kiwi_pkg::*;

  logic clk = 1'b0, reset = 1'b1;
  always #5 clk = ~clk;

  logic [7:0]  farm_tx_data, single_tx_data;
  logic        farm_tx_sof_n, farm_tx_eof_n, farm_tx_src_rdy_n, farm_tx_dst_rdy_n = 1'b0;
  logic        single_tx_sof_n, single_tx_eof_n, single_tx_src_rdy_n, single_tx_dst_rdy_n = 1'b0;
  logic [7:0]  farm_rx_data = '0, single_rx_data = '0;
  logic        farm_rx_sof_n = 1'b1, farm_rx_eof_n = 1'b1, farm_rx_src_rdy_n = 1'b1, farm_rx_dst_rdy_n;
  logic        single_rx_sof_n = 1'b1, single_rx_eof_n = 1'b1, single_rx_src_rdy_n = 1'b1, single_rx_dst_rdy_n;
  logic [2:0]  farm_rx_led, farm_tx_led, farm_work_led, farm_poll_led;
  logic [3:0]  farm_port_rx_ready;
  logic [31:0] farm_frames_forwarded, farm_frames_discarded, farm_tx_stalls, farm_monitor_requests;
  logic        single_rx_led, single_tx_led, single_work_led, single_poll_led;
  logic [31:0] single_jobs_done, single_seq_errors, single_rx_frames, single_tx_frames;
  logic        fact_reset = 1'b1, fact_done;
  logic [7:0]  fact_n = 8'd5;
  logic [15:0] fact_fac;

  kiwi_top dut (.*);

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

  function automatic logic [31:0] llc(input int p);
    return {LLC_HEADER_CONST, 8'h00, 8'(p)};
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
  chan_t fch [3];      // farm filters
  chan_t sch [3];      // single-app channels
  int    sbuf [512];   // single-app work buffer model

  // ------------------------------------------------ mechanism counters
  int n_holdoff = 0, n_backpressure = 0, n_past_len = 0;

  // ------------------------------------------------ LocalLink sources
  task automatic send_farm(input bq_t b);
    for (int n = 0; n < b.size(); n++) begin
      @(negedge clk);
      farm_rx_data = b[n]; farm_rx_src_rdy_n = 1'b0;
      farm_rx_sof_n = (n != 0); farm_rx_eof_n = (n != b.size() - 1);
      @(posedge clk);
      while (farm_rx_dst_rdy_n) begin
        if (n == 0) n_holdoff++;
        @(posedge clk);
      end
    end
    @(negedge clk) begin farm_rx_src_rdy_n = 1'b1; farm_rx_sof_n = 1'b1; farm_rx_eof_n = 1'b1; end
  endtask
  task automatic send_single(input bq_t b);
    for (int n = 0; n < b.size(); n++) begin
      @(negedge clk);
      single_rx_data = b[n]; single_rx_src_rdy_n = 1'b0;
      single_rx_sof_n = (n != 0); single_rx_eof_n = (n != b.size() - 1);
      do @(posedge clk); while (single_rx_dst_rdy_n);
    end
    @(negedge clk) begin single_rx_src_rdy_n = 1'b1; single_rx_sof_n = 1'b1; single_rx_eof_n = 1'b1; end
  endtask

  // ------------------------------------------------ LocalLink sinks
  bq_t fcur, scur;
  bq_t ffr[$];
  bq_t sfr[$];
  always @(posedge clk) begin
    if (!reset && !farm_tx_src_rdy_n && !farm_tx_dst_rdy_n) begin
      fcur.push_back(farm_tx_data);
      if (!farm_tx_eof_n) begin ffr.push_back(fcur); fcur = {}; end
    end
    if (!reset && !farm_tx_src_rdy_n && farm_tx_dst_rdy_n) n_backpressure++;
    if (!reset && !single_tx_src_rdy_n && !single_tx_dst_rdy_n) begin
      scur.push_back(single_tx_data);
      if (!single_tx_eof_n) begin sfr.push_back(scur); scur = {}; end
    end
  end
  always @(negedge clk) begin
    farm_tx_dst_rdy_n   = ($urandom_range(0, 3) == 0);
    single_tx_dst_rdy_n = ($urandom_range(0, 3) == 0);
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

  // ------------------------------------------------ shared-FPGA scenario
  wq_t fexp [3];
  bit  farm_done = 1'b0;

  task automatic farm_job(input int port, input int n);
    wq_t data, fw;
    data = {};
    for (int k = 0; k < n; k++) begin
      int x;
      x = $urandom_range(0, 255);
      data.push_back(32'(x));
      fexp[port].push_back(32'(conv(fch[port], x)));
    end
    fw = message(0, data);
    fw.push_front(llc(port));
    fw.push_front(32'(fw.size() - 1));
    send_farm(make_frame(fw));
  endtask

  task automatic farm_scenario();
    wq_t w;
    bq_t junk;
    bit  seen [4];
    for (int p = 0; p < 3; p++) begin fch[p].p = 0; fch[p].m = 0; fch[p].d = '{default: 0}; end
    farm_job(0, 24);
    farm_job(1, 20);
    farm_job(2, 12);
    // a frame for a port nobody registered
    send_farm(make_frame('{32'd2, llc(9), 32'h1, 32'h2}));
    // an oversize frame: 2100 bytes, no LLC header
    junk = make_frame('{32'd1});
    while (junk.size() < 2100) junk.push_back(8'h55);
    send_farm(junk);
    // wait for the three replies
    wait (ffr.size() == 3);
    for (int r = 0; r < 3; r++) begin
      int p;
      w = reply_words(ffr[r], "farm reply");
      p = w[0][7:0];
      check(w[0][31:16] == LLC_HEADER_CONST && p < 3 && !seen[p], "reply LLC header");
      if (p < 3) begin
        seen[p] = 1'b1;
        check_msg(w, 1, 0, fexp[p], $sformatf("filter %0d", p));
      end
    end
    // monitor request, sent once everything else has settled
    repeat (200) @(posedge clk);
    send_farm(make_frame('{32'd4, llc(3), PROTO_ID_START, 32'd0, 32'd0, PROTO_ID_END}));
    wait (ffr.size() == 4);
    w = reply_words(ffr[3], "monitor reply");
    check(w[0] == llc(3), "monitor reply header");
    check_msg(w, 1, 0, '{32'd6, 32'd3, 32'd4, 32'd2, 32'd1, 32'd1, 32'd1,
                         32'd0, 32'd0, 32'd0, 32'd1, 32'd0}, "monitor report");
    repeat (10) @(posedge clk);
    farm_done = 1'b1;
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
    check(single_jobs_done == 2 && single_seq_errors == 0, "single app: two jobs, no errors");
    check(single_rx_frames == 2 && single_tx_frames == 2, "single app frame counts");
    single_done = 1'b1;
  endtask

  // ------------------------------------------------ factorial
  int n_fact = 0;
  task automatic fact_run(input int nn, input int unsigned f);
    int cyc = 0;
    @(negedge clk) begin fact_reset = 1'b1; fact_n = 8'(nn); end
    @(negedge clk) fact_reset = 1'b0;
    while (!fact_done && cyc < 100) begin @(posedge clk); #1; cyc++; end
    check(fact_fac == 16'(f) && cyc == nn - 1,
          $sformatf("factorial %0d! = %0d after %0d cycles", nn, fact_fac, cyc));
    n_fact++;
  endtask
  task automatic fact_scenario();
    fact_run(5, 120);
    fact_run(8, 40320);
  endtask

  initial begin
    repeat (4) @(negedge clk);
    reset = 1'b0;
    fork
      farm_scenario();
      single_scenario();
      fact_scenario();
    join
    // mechanisms
    check(farm_frames_forwarded == 4, "mechanism: frames forwarded to ports");
    check(farm_frames_discarded == 2, "mechanism: frames discarded");
    check(farm_tx_stalls > 0, $sformatf("mechanism: transmit mutex stall (%0d)", farm_tx_stalls));
    check(n_holdoff > 0, "mechanism: receiver hold-off");
    check(n_backpressure > 0, "mechanism: transmit back-pressure");
    check(farm_monitor_requests == 1, "mechanism: monitor report");
    check(n_past_len > 0, "mechanism: three-channel group past len");
    check(n_fact == 2, "factorial circuit runs");
    $display("mechanisms: forwarded=%0d discarded=%0d stalls=%0d holdoff=%0d backpressure=%0d past_len=%0d",
             farm_frames_forwarded, farm_frames_discarded, farm_tx_stalls, n_holdoff,
             n_backpressure, n_past_len);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog (farm_done=%0d single_done=%0d)", farm_done, single_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
