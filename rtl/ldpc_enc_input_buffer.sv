// ldpc_enc_input_buffer: the encoder's 512-bit information buffer.
//
// The K = 512 information bits of one codeword are written one per cycle,
// addressed by their index k = 64*bc + c. The buffer is split into NB = 8
// banks of P = 64 bits, one per block column of Hd, so that the interleaver
// can read one bit from every bank in the same cycle (one bit per shifted
// identity of a parity row). Writes take effect at the clock edge; reads are
// asynchronous (distributed-RAM style). The buffer is not reset: every bit is
// written before it is read. The 512-bit size is the published one; the
// banking is this design's choice.
module ldpc_enc_input_buffer
  import ldpc_pkg::*;
(
  input  logic                       clk,
  input  logic                       we,
  input  logic [$clog2(K)-1:0]       waddr,   // information bit index
  input  logic                       wbit,
  input  logic [NB-1:0][AW-1:0]      raddr,   // one address per bank
  output logic [NB-1:0]              rbit
);

  logic [P-1:0] bank [NB];

  always_ff @(posedge clk) begin
    if (we) bank[waddr[$clog2(K)-1:AW]][waddr[AW-1:0]] <= wbit;
  end

  always_comb begin
    for (int b = 0; b < NB; b++) rbit[b] = bank[b][raddr[b]];
  end

endmodule
