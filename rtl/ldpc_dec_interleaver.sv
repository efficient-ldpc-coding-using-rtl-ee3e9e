// ldpc_dec_interleaver: interleaver, deinterleaver and memory switches of the
// decoder.
//
// The message banks are ordered by check row, so the CNU side (deinterleaver)
// reads and writes every bank at the row offset t, while the VNU side
// (interleaver) has to find, for column t of each block column, the row of
// each edge:
//  * interleaver(Hd): bank of block (br, bc) with right shift s is accessed
//    at row (t - s) mod 64 by the VNU of block column bc;
//  * interleaver(Hp): VNU(Hp) k reads A_k at t and B_k at t + 1; for the
//    last column of a block (t = 63) the lower diagonal edge is entry 0 of
//    B_(k+1), so that edge is routed across banks, and the last parity
//    column (k = 7, t = 63) has no second edge;
//  * deinterleaver: CNU br gets its three Hd banks, A_br and B_br at t; the
//    B edge is disabled for row 0.
// phase_v selects the VNU side (variable pass) or the CNU side (check pass),
// the two switches in front of MEM. Write enables are qualified by act.
// Purely combinational. Interleaver and deinterleaver blocks and the Hd/Hp
// split are published; the addressing scheme is this design's choice.
module ldpc_dec_interleaver
  import ldpc_pkg::*;
#(
  parameter int NBANK = NHD + 2 * MB
) (
  input  logic                        phase_v,   // 1 = variable pass
  input  logic                        act,       // this cycle does work
  input  logic [AW-1:0]               t,         // column / row offset
  // VNU side, after the F tables
  input  msg_t [NB-1:0][DV_HD-1:0]    vnu_hd_out,
  input  msg_t [MB-1:0][1:0]          vnu_hp_out,
  output msg_t [NB-1:0][DV_HD-1:0]    vnu_hd_in,
  output msg_t [MB-1:0][1:0]          vnu_hp_in,
  output logic [MB-1:0][1:0]          vnu_hp_en,
  // CNU side, after the F tables
  input  msg_t [MB-1:0][DC-1:0]       cnu_out,
  output msg_t [MB-1:0][DC-1:0]       cnu_in,
  output logic [MB-1:0][DC-1:0]       cnu_en,
  // memory
  output logic [NBANK-1:0][AW-1:0]    mem_addr,
  output logic [NBANK-1:0]            mem_we,
  output msg_t [NBANK-1:0]            mem_wdata,
  input  msg_t [NBANK-1:0]            mem_rdata
);

  localparam int A0 = NHD;        // first A bank
  localparam int B0 = NHD + MB;   // first B bank
  localparam logic [AW-1:0] LAST = AW'(P - 1);

  // Position (0..2) of block (br, bc) among the blocks of its block column
  // and of its block row.
  function automatic int col_slot(input int br, input int bc);
    for (int k = 0; k < DV_HD; k++) if (int'(COL_ROW[bc][k]) == br) return k;
    return 0;
  endfunction
  function automatic int row_slot(input int br, input int bc);
    for (int k = 0; k < DC_HD; k++) if (int'(ROW_COL[br][k]) == bc) return k;
    return 0;
  endfunction

  // ---------------- Hd banks: interleaver(Hd) and deinterleaver ----------------
  for (genvar br = 0; br < MB; br++) begin : g_row
    for (genvar bc = 0; bc < NB; bc++) begin : g_col
      if (HD_BANK[br][bc] != 5'd31) begin : g_blk
        localparam int BANK = int'(HD_BANK[br][bc]);
        localparam int KV   = col_slot(br, bc);
        localparam int KC   = row_slot(br, bc);
        localparam logic [AW-1:0] S = HD_S[br][bc];
        // Column t of a block shifted right by s meets row (t - s) mod p.
        assign mem_addr[BANK]  = phase_v ? t - S : t;
        assign mem_we[BANK]    = act;
        assign mem_wdata[BANK] = phase_v ? vnu_hd_out[bc][KV] : cnu_out[br][KC];
        assign vnu_hd_in[bc][KV] = mem_rdata[BANK];
        assign cnu_in[br][KC]    = mem_rdata[BANK];
        assign cnu_en[br][KC]    = 1'b1;
      end
    end
  end

  // ---------------- Hp banks: interleaver(Hp) and deinterleaver ----------------
  for (genvar k = 0; k < MB; k++) begin : g_hp
    // A_k: edge (row 64k+r, column 64k+r), same offset on both sides.
    assign mem_addr[A0 + k]  = t;
    assign mem_we[A0 + k]    = act;
    assign mem_wdata[A0 + k] = phase_v ? vnu_hp_out[k][0] : cnu_out[k][DC_HD];
    assign vnu_hp_in[k][0]   = mem_rdata[A0 + k];
    assign vnu_hp_en[k][0]   = 1'b1;
    assign cnu_in[k][DC_HD]  = mem_rdata[A0 + k];
    assign cnu_en[k][DC_HD]  = 1'b1;

    // B_k: edge (row 64k+r, column 64k+r-1). Column t of VNU(Hp) k meets it
    // at offset t+1 of B_k, or at offset 0 of B_(k+1) when t = 63.
    assign mem_addr[B0 + k] = phase_v ? t + 1'b1 : t;
    assign cnu_in[k][DC_HD + 1] = mem_rdata[B0 + k];
    assign cnu_en[k][DC_HD + 1] = (k != 0) || (t != '0);
    if (k == 0) begin : g_first
      // B_0 entry 0 does not exist; at t = 63 no column reaches B_0.
      assign mem_wdata[B0 + k] = phase_v ? vnu_hp_out[k][1] : cnu_out[k][DC_HD + 1];
      assign mem_we[B0 + k]    = act && (phase_v ? (t != LAST) : (t != '0));
    end else begin : g_other
      assign mem_wdata[B0 + k] = !phase_v     ? cnu_out[k][DC_HD + 1] :
                                 (t != LAST) ? vnu_hp_out[k][1] : vnu_hp_out[k - 1][1];
      assign mem_we[B0 + k]    = act;
    end
    if (k < MB - 1) begin : g_next
      assign vnu_hp_in[k][1] = (t != LAST) ? mem_rdata[B0 + k] : mem_rdata[B0 + k + 1];
      assign vnu_hp_en[k][1] = 1'b1;
    end else begin : g_last
      // The last parity column has a single edge.
      assign vnu_hp_in[k][1] = mem_rdata[B0 + k];
      assign vnu_hp_en[k][1] = (t != LAST);
    end
  end

endmodule
