// tb_photo_filter_channel: drives random samples through one convolver
// channel, with channel resets in between, and compares every result with
// a software model of the same convolution (circular store, fill mark,
// data indexed by tap, coefficient by (ptr - tap) mod 9). Also checks that
// each call takes 11 cycles from request to acknowledge.
module tb_photo_filter_channel;
  import kiwi_pkg::*;

  logic        clk = 1'b0, reset = 1'b1;
  logic        ch_reset = 1'b0, conv_req = 1'b0, conv_ack;
  logic [31:0] din = '0, dout;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  photo_filter_channel dut (.*);

  // model
  int mdata [9];
  int mptr, mmax;
  int k_coef [9] = '{1, -2, 3, -4, 5, -4, 3, -2, 1};

  function automatic int model_convolve(int x);
    int s;
    mptr = (mptr == 8) ? 0 : mptr + 1;
    if (mptr > mmax) mmax = mptr;
    mdata[mptr] = x;
    s = 0;
    for (int t = 0; t < 9; t++) begin
      int y;
      y = (mptr - t + 9) % 9;
      if (t <= mmax && y <= mmax) s += mdata[t] * k_coef[y];
    end
    return s;
  endfunction

  task automatic call(input logic [31:0] x);
    int cyc, exp_v;
    exp_v = model_convolve(x);
    @(negedge clk);
    din = x; conv_req = 1'b1;
    cyc = 0;
    do begin @(posedge clk); #1; cyc++; end while (!conv_ack);
    checks++;
    if (dout !== 32'(exp_v)) begin
      failures++;
      $display("FAIL convolve(%0d): got %0d expected %0d", $signed(x), $signed(dout), exp_v);
    end
    checks++;
    if (cyc != 11) begin
      failures++;
      $display("FAIL latency %0d cycles, expected 11", cyc);
    end
    @(negedge clk) conv_req = 1'b0;
    @(negedge clk);
  endtask

  task automatic do_reset();
    @(negedge clk) ch_reset = 1'b1;
    @(negedge clk) ch_reset = 1'b0;
    mptr = 0; mmax = 0;
  endtask

  initial begin
    for (int t = 0; t < 9; t++) mdata[t] = 0;
    mptr = 0; mmax = 0;
    repeat (3) @(negedge clk);
    reset = 1'b0;
    // impulse
    call(32'd1);
    for (int n = 0; n < 12; n++) call(32'd0);
    do_reset();
    for (int n = 0; n < 40; n++) call(32'($urandom_range(0, 2000)) - 32'd1000);
    do_reset();
    for (int n = 0; n < 5; n++) call($urandom);
    do_reset();
    for (int n = 0; n < 20; n++) call(32'($urandom_range(0, 255)));
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
