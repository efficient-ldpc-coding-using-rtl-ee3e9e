// ldpc_vnu: variable node unit, one column of H per cycle.
//
// Adds the channel LLR and the DEG incoming check messages of the column
// (sign-magnitude, converted to two's complement) into the posterior LLR,
// whose sign is the hard decision. Each outgoing message is the posterior
// minus the message that came in on the same edge, saturated back to the
// 4-bit magnitude. Edges with en = 0 contribute nothing. With first = 1 all
// check messages are taken as zero, which is the initial pass where every
// outgoing message is the channel LLR. DEG = 3 gives the VNU of an Hd column,
// DEG = 2 the VNU of an Hp column (its second edge disabled for the last
// column). Purely combinational; memory read, VNU, F table and memory write
// fit in one clock cycle. The unit counts are published; the arithmetic is
// the standard sum-product variable update, this design's choice.
module ldpc_vnu
  import ldpc_pkg::*;
#(
  parameter int DEG = 3
) (
  input  msg_t           lch,        // channel LLR
  input  msg_t [DEG-1:0] cv,         // check-to-variable messages
  input  logic [DEG-1:0] en,         // edge exists
  input  logic           first,      // initial pass: ignore cv
  output msg_t [DEG-1:0] vc,         // variable-to-check messages
  output logic           hard        // hard decision, 1 = bit 1
);

  localparam int SW = MAG_W + 2 + $clog2(DEG + 1);
  typedef logic signed [SW-1:0] sum_t;

  function automatic sum_t to_int(input msg_t m);
    return m.sign ? -sum_t'({1'b0, m.mag}) : sum_t'({1'b0, m.mag});
  endfunction

  function automatic msg_t to_msg(input sum_t v);
    msg_t m;
    sum_t a;
    a = (v < 0) ? -v : v;
    m.sign = (v < 0);
    m.mag  = (a > sum_t'(MAG_MAX)) ? mag_t'(MAG_MAX) : a[MAG_W-1:0];
    return m;
  endfunction

  sum_t total;
  sum_t term [DEG];

  always_comb begin
    total = to_int(lch);
    for (int e = 0; e < DEG; e++) begin
      term[e] = (en[e] && !first) ? to_int(cv[e]) : '0;
      total   = total + term[e];
    end
    for (int e = 0; e < DEG; e++) vc[e] = to_msg(total - term[e]);
    hard = (total < 0);
  end

endmodule
