// ldpc_dec_mem: the decoder's message memory (MEM).
//
// Holds one 5-bit message per edge of H and the channel LLR of every code
// bit, 17,920 bits in all:
//  * banks 0..23: one per non-zero block of Hd, 64 edges each, addressed by
//    the row offset of the edge inside its block;
//  * banks 24..31 (A_k): edge between row 64k+r and parity column 64k+r;
//  * banks 32..39 (B_k): edge between row 64k+r and parity column 64k+r-1
//    (B_0 entry 0 is unused, row 0 has no such edge);
//  * 16 channel banks, 64 LLRs each, for code bits 64k + t.
// An edge's slot holds the variable-to-check message after the variable pass
// and is overwritten by the check-to-variable message in the check pass.
// Every bank has its own address, reads asynchronously and writes on the
// clock edge, so one read-modify-write per bank per cycle. Not reset; the
// decoder writes every slot before it reads it. The total size matches the
// published block RAM use; the partitioning is this design's choice.
module ldpc_dec_mem
  import ldpc_pkg::*;
#(
  parameter int NBANK = NHD + 2 * MB,
  parameter int NCH   = NB + MB
) (
  input  logic                       clk,
  input  logic [NBANK-1:0][AW-1:0]   addr,
  input  logic [NBANK-1:0]           we,
  input  msg_t [NBANK-1:0]           wdata,
  output msg_t [NBANK-1:0]           rdata,
  input  logic [AW-1:0]              ch_addr,
  input  logic                       ch_we,
  input  msg_t [NCH-1:0]             ch_wdata,
  output msg_t [NCH-1:0]             ch_rdata
);

  // One independent 64-entry memory per bank.
  for (genvar b = 0; b < NBANK; b++) begin : g_msg
    msg_t mem [P];
    always_ff @(posedge clk) if (we[b]) mem[addr[b]] <= wdata[b];
    assign rdata[b] = mem[addr[b]];
  end

  for (genvar b = 0; b < NCH; b++) begin : g_ch
    msg_t mem [P];
    always_ff @(posedge clk) if (ch_we) mem[ch_addr] <= ch_wdata[b];
    assign ch_rdata[b] = mem[ch_addr];
  end

endmodule
