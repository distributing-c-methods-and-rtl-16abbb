// factorial_circuit: small example circuit that computes n! iteratively,
// one multiplication per clock cycle.
//
// While reset is high the circuit captures the input n into its counter i
// and sets fac to 1 and done to 0. After reset, in each cycle in which
// i > 1 it multiplies fac by i and decrements i. Once i has reached 1 (or
// n was 0 or 1), done rises and fac holds n! truncated to FAC_WIDTH bits.
// For n >= 2, done is high n-1 cycles after the first cycle without reset;
// for n = 0 or 1 it rises one cycle after reset is released.
//
// Follows the design: an 8-bit input n, a 16-bit result fac, a done flag,
// and one multiplication per clock cycle. Two details are this design's
// own: the decrement of i, and ending at once for n = 0 (where the loop as
// written would never end).
module factorial_circuit #(
  parameter int unsigned N_WIDTH   = 8,
  parameter int unsigned FAC_WIDTH = 16
) (
  input  logic                 clk,
  input  logic                 reset,
  input  logic [N_WIDTH-1:0]   n,
  output logic [FAC_WIDTH-1:0] fac,
  output logic                 done
);

  logic [N_WIDTH-1:0] i;

  always_ff @(posedge clk) begin
    if (reset) begin
      i    <= n;
      fac  <= FAC_WIDTH'(1);
      done <= 1'b0;
    end else if (!done) begin
      if (i > N_WIDTH'(1)) begin
        fac <= FAC_WIDTH'(fac * FAC_WIDTH'(i));
        i   <= i - 1'b1;
        if (i == N_WIDTH'(2)) done <= 1'b1;
      end else begin
        done <= 1'b1;
      end
    end
  end

endmodule
