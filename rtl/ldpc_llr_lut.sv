// ldpc_llr_lut: converts a received channel sample into an LLR message.
//
// The sample is a two's complement number (IN_W bits) for a BPSK symbol,
// bit 0 sent as +1 and bit 1 as -1. Its LLR is proportional to the sample:
// the magnitude becomes min(15, round(|y| * LLR_GAIN / 16)) in the 4-bit
// message format, the sign is the sample's sign. LLR_GAIN holds 2/sigma^2
// times the scale between sample and message LSBs, as a Q4 number, so the
// table follows the channel noise. Purely combinational. That the decoder
// input passes through an LLR table is published; its contents, the sample
// width and the gain are this design's choices.
module ldpc_llr_lut
  import ldpc_pkg::*;
#(
  parameter int IN_W     = 6,
  parameter int LLR_GAIN = 32
) (
  input  logic signed [IN_W-1:0] y,
  output msg_t                   llr
);

  localparam int PW = IN_W + 9;
  logic [IN_W-1:0] abs_y;
  logic [PW-1:0]   prod;

  always_comb begin
    abs_y = y[IN_W-1] ? IN_W'(-y) : IN_W'(y);
    prod  = (PW'(abs_y) * PW'(LLR_GAIN) + PW'(8)) >> 4;
    llr.sign = y[IN_W-1];
    llr.mag  = (prod > PW'(MAG_MAX)) ? mag_t'(MAG_MAX) : prod[MAG_W-1:0];
  end

endmodule
