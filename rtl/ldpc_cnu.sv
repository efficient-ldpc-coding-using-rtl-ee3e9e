// ldpc_cnu: check node unit, one row of H per cycle.
//
// Its inputs are the row's variable-to-check messages after the F table,
// i.e. a sign and phi(|q|) for each of the DEG edges (3 from Hd and 2 from Hp,
// DEG = 5). It adds the phi values, and for each edge subtracts that edge's
// own value (saturating to the 4-bit magnitude) and takes the XOR of the other
// edges' signs. The F table behind it turns the magnitude into
// phi(sum of the others), the log-domain check update. Edges with en = 0 (the
// missing Hp edge of row 0) take no part. Purely combinational. The unit
// count is published; the arithmetic is the standard log-domain check update,
// this design's choice.
module ldpc_cnu
  import ldpc_pkg::*;
#(
  parameter int DEG = DC
) (
  input  msg_t [DEG-1:0] q,     // sign and phi(|q|) per edge
  input  logic [DEG-1:0] en,    // edge exists
  output msg_t [DEG-1:0] r      // sign and sum of the other phi values
);

  localparam int SW = MAG_W + $clog2(DEG + 1);

  logic [SW-1:0] sum;
  logic          sgn;
  logic [SW-1:0] part;

  always_comb begin
    sum = '0;
    sgn = 1'b0;
    for (int e = 0; e < DEG; e++) begin
      if (en[e]) begin
        sum = sum + SW'(q[e].mag);
        sgn = sgn ^ q[e].sign;
      end
    end
    for (int e = 0; e < DEG; e++) begin
      part = sum - (en[e] ? SW'(q[e].mag) : '0);
      r[e].sign = sgn ^ (en[e] & q[e].sign);
      r[e].mag  = (part > SW'(MAG_MAX)) ? mag_t'(MAG_MAX) : part[MAG_W-1:0];
    end
  end

endmodule
