// ldpc_enc_interleaver: the Hd interleaver of the encoder.
//
// For parity row i = 64*br + r it gives each of the NB = 8 input buffer
// banks the address of the information bit that Hd row i selects in that
// block column, (r + s) mod 64 for a block shifted by s, and masks the banks
// whose block is zero. The XOR of the three selected bits is the term
// sum_j h_ij d_j of the parity equation, handed to the parity generator.
// Purely combinational. The shift table is the published one; reading
// the buffer in banks and forming the XOR here are this design's choices.
module ldpc_enc_interleaver
  import ldpc_pkg::*;
(
  input  logic [$clog2(M)-1:0]  row,       // parity row index i
  output logic [NB-1:0][AW-1:0] raddr,     // to the input buffer banks
  input  logic [NB-1:0]         rbit,      // from the input buffer banks
  output logic                  hd_sum     // XOR of the selected bits
);

  logic [AW-1:0] r;
  logic [$clog2(MB)-1:0] br;
  logic [NB-1:0] mask;

  assign r  = row[AW-1:0];
  assign br = row[$clog2(M)-1:AW];

  always_comb begin
    raddr = '0;
    mask  = '0;
    for (int b = 0; b < MB; b++) begin
      if (br == b[$clog2(MB)-1:0]) begin
        for (int c = 0; c < NB; c++) begin
          if (HD_SHIFT[b][c] >= 0) begin
            mask[c]  = 1'b1;
            raddr[c] = r + AW'(HD_SHIFT[b][c]);
          end
        end
      end
    end
    hd_sum = ^(rbit & mask);
  end

endmodule
