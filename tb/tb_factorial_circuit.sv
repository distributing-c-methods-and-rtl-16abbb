// tb_factorial_circuit: runs the factorial circuit for n = 0..12 and a few
// larger n, comparing fac with n! modulo 2^16 computed in the testbench
// and checking that done rises after max(n-1, 1) cycles and then holds.
module tb_factorial_circuit;
  logic        clk = 1'b0, reset = 1'b1;
  logic [7:0]  n = '0;
  logic [15:0] fac;
  logic        done;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  factorial_circuit dut (.*);

  task automatic run(input int unsigned nn);
    longint unsigned f = 1;
    int cyc = 0, exp_cyc;
    for (int unsigned k = 2; k <= nn; k++) f = (f * k) & 64'hFFFF;
    exp_cyc = (nn >= 2) ? int'(nn) - 1 : 1;
    @(negedge clk) begin reset = 1'b1; n = 8'(nn); end
    @(negedge clk) reset = 1'b0;
    while (!done && cyc < 400) begin @(posedge clk); #1; cyc++; end
    checks++;
    if (fac !== 16'(f)) begin
      failures++;
      $display("FAIL %0d! = %0d expected %0d", nn, fac, f);
    end
    checks++;
    if (cyc != exp_cyc) begin
      failures++;
      $display("FAIL %0d! took %0d cycles, expected %0d", nn, cyc, exp_cyc);
    end
    repeat (3) @(posedge clk);
    #1 checks++;
    if (!done || fac !== 16'(f)) begin failures++; $display("FAIL %0d! result not held", nn); end
  endtask

  initial begin
    for (int unsigned k = 0; k <= 12; k++) run(k);
    run(20);
    run(255);
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
