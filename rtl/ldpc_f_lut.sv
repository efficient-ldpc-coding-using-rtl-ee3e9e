// ldpc_f_lut: the F function look-up table of the log-domain decoder.
//
// Replaces the magnitude of a message by phi(x) = -ln(tanh(x/2)), quantised
// to the 4-bit magnitude format (LSB = 0.25, phi(0) saturated to the maximum);
// the sign passes unchanged. One table sits behind every VNU edge output and
// every CNU edge output, so the check node can add phi values and the
// variable node receives phi of that sum, the usual log-domain form of
// belief propagation. Purely combinational. That a table named F function
// follows both VNU and CNU is published; the function it holds and its
// quantisation are this design's choices (see ldpc_pkg::f_phi).
module ldpc_f_lut
  import ldpc_pkg::*;
(
  input  msg_t din,
  output msg_t dout
);

  assign dout.sign = din.sign;
  assign dout.mag  = f_phi(din.mag);

endmodule
