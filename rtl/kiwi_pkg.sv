// kiwi_pkg: types and constants shared by the network device, the LLC
// dispatcher, the reliability layer and the application servers.
//
// Every remote method call between separately built components uses a
// four-phase req/ack handshake: the caller raises req with its arguments
// stable, the callee does the work, drives any return value and raises ack,
// the caller drops req, the callee drops ack. Framing tells the network
// device and the dispatcher where a frame starts and ends.
//
// The protocol identifiers and the coefficients are the ones of the design;
// the LLC header constant and the two-bit Framing encoding are choices of
// this implementation.
package kiwi_pkg;

  // Position of a word within a transmitted frame.
  typedef enum logic [1:0] {
    FR_START = 2'd0,   // first word: opens a frame (and claims the mutex)
    FR_MID   = 2'd1,   // any word in between
    FR_END   = 2'd2    // last word: closes the frame and sends it
  } framing_e;

  // Reliability-layer protocol id + flags, without and with end-of-message.
  localparam logic [31:0] PROTO_ID_START = 32'h45C0_3200;
  localparam logic [31:0] PROTO_ID_END   = 32'h45C0_3201;

  // Upper half of the LLC-like header word that carries the port number
  // in its low byte.
  localparam logic [15:0] LLC_HEADER_CONST = 16'hAA03;

  // Destination and source MAC addresses at the head of every frame.
  localparam int unsigned MAC_HDR_BYTES = 12;

  // One-dimensional convolution kernel of the photo filter.
  localparam int unsigned NTAPS = 9;
  localparam logic signed [NTAPS-1:0][31:0] COEFS =
    {32'sd1, -32'sd2, 32'sd3, -32'sd4, 32'sd5, -32'sd4, 32'sd3, -32'sd2, 32'sd1};

  // Coefficient with index i (0 is the first listed).
  function automatic logic signed [31:0] coef(input int unsigned i);
    return COEFS[NTAPS-1-i];
  endfunction

endpackage
