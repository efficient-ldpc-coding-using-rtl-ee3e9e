// ldpc_parity_gen: the parity bit generator, one XOR gate feeding one
// D flip-flop whose output is fed back to the XOR.
//
// Each enabled cycle it computes p_i = p_(i-1) xor sum_j h_ij d_j, so after
// the clock edge of row i the flip-flop output is parity bit p_i. For the
// first row of a codeword, first = 1 replaces the fed-back value with 0, so
// p_0 = sum_j h_0j d_j. The XOR-plus-flip-flop structure is the published
// one; the enable, the first-row input and the active-low reset are this
// design's choices.
module ldpc_parity_gen (
  input  logic clk,
  input  logic rst_n,
  input  logic en,       // one parity row per enabled cycle
  input  logic first,    // this row is row 0 of a codeword
  input  logic hd_sum,   // sum_j h_ij d_j for the current row
  output logic p         // flip-flop output: the latest parity bit
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  p <= 1'b0;
    else if (en) p <= (first ? 1'b0 : p) ^ hd_sum;
  end

endmodule
