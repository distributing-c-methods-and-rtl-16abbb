// photo_filter_channel: one colour channel of the photo filter, a 9-tap
// one-dimensional convolver that works one tap per clock cycle.
//
// State: a 9-entry circular sample store, a pointer ptr and a fill mark
// max (highest pointer written since the last reset). A convolve call
// (four-phase conv_req/conv_ack with din) first advances ptr (wrapping
// 8 -> 0), raises max to ptr if needed and stores din at ptr, then in
// each of the next 9 cycles xx = 0..8 adds data[xx] * coef(yy) with
// yy = (ptr - xx) mod 9, but only for taps where both xx and yy are
// within max. The 32-bit signed sum (wrapping, like C# int) is returned in
// dout with conv_ack, 11 cycles after the request is seen. A one-cycle
// ch_reset pulse resets ptr and max; the sample store keeps its contents
// (only the global reset clears it).
//
// Follows the design exactly in its arithmetic, including the indexing of
// data by xx and of the coefficients by yy, and the one-tap-per-cycle
// schedule. The handshake and the one setup cycle are this design's.
module photo_filter_channel
  import kiwi_pkg::*;
(
  input  logic        clk,
  input  logic        reset,
  input  logic        ch_reset,
  input  logic        conv_req,
  output logic        conv_ack,
  input  logic [31:0] din,
  output logic [31:0] dout
);

  typedef enum logic [1:0] {S_IDLE, S_STORE, S_TAP, S_ACK} state_e;
  state_e             state;
  logic signed [31:0] data [NTAPS];
  logic [3:0]         ptr, max, xx;
  logic signed [31:0] sum;
  logic [3:0]         yy;
  logic [3:0]         ptr_n;

  assign ptr_n = (ptr == 4'(NTAPS - 1)) ? 4'd0 : ptr + 4'd1;
  // (ptr - xx + 9) mod 9 with both below 9
  assign yy    = (ptr >= xx) ? ptr - xx : ptr + 4'(NTAPS) - xx;

  always_ff @(posedge clk) begin
    if (reset) begin
      state <= S_IDLE;
      ptr   <= '0;
      max   <= '0;
      xx    <= '0;
      sum   <= '0;
      dout  <= '0;
      for (int i = 0; i < NTAPS; i++) data[i] <= '0;
    end else begin
      if (ch_reset && state == S_IDLE) begin
        ptr <= '0;
        max <= '0;
      end
      case (state)
        S_IDLE: if (conv_req && !ch_reset) state <= S_STORE;
        S_STORE: begin
          ptr         <= ptr_n;
          if (ptr_n > max) max <= ptr_n;
          data[ptr_n] <= din;
          xx          <= '0;
          sum         <= '0;
          state       <= S_TAP;
        end
        S_TAP: begin
          logic signed [31:0] acc;
          acc = sum;
          if (xx <= max && yy <= max) acc = sum + data[xx] * coef(32'(yy));
          sum <= acc;
          xx  <= xx + 4'd1;
          if (xx == 4'(NTAPS - 1)) begin
            dout  <= acc;
            state <= S_ACK;
          end
        end
        S_ACK: if (!conv_req) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign conv_ack = (state == S_ACK);

endmodule
