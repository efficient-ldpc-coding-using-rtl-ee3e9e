// ldpc_pkg: constants and helpers shared by the hybrid H-matrix LDPC encoder
// and decoder.
//
// The code is a (1024,512) rate-1/2 code with H = [Hd, Hp]:
//  * Hd (512 x 512) is an 8 x 8 base matrix expanded by p = 64. Each non-zero
//    base entry is a 64 x 64 identity matrix cyclically shifted right by the
//    number printed in HD_SHIFT; a zero base entry is a 64 x 64 zero block.
//    Row r of a block with shift s has its 1 in column (r + s) mod 64.
//  * Hp (512 x 512) is the dual-diagonal matrix of the semi-random technique:
//    row i has ones in parity columns i and i-1 (row 0 only in column 0).
// Every block row and block column of Hd holds exactly three shifted
// identities, so each check row has degree 5 (4 for row 0) and each
// information column degree 3.
//
// The shift table and the sizes are the published ones. The shift direction
// convention, the message format (sign + 4-bit magnitude, LSB = 0.25) and the
// F function table are this design's choices.
package ldpc_pkg;

  localparam int P      = 64;          // expansion factor (sub-matrix size)
  localparam int MB     = 8;           // block rows of the base matrix (CNUs)
  localparam int NB     = 8;           // block columns of Hd
  localparam int K      = P * NB;      // information bits, 512
  localparam int M      = P * MB;      // parity bits / check rows, 512
  localparam int NHD    = 24;          // non-zero blocks of Hd
  localparam int DV_HD  = 3;           // blocks per block column of Hd
  localparam int DC_HD  = 3;           // blocks per block row of Hd
  localparam int DC     = DC_HD + 2;   // check degree with the two Hp edges
  localparam int AW     = $clog2(P);   // address width inside a block

  // Right-shift of each identity block; -1 marks a zero block.
  localparam int HD_SHIFT [MB][NB] = '{
    '{-1, 41, 35, 62, -1, -1, -1, -1},
    '{ 4, -1, -1, 33, -1, -1, 44, -1},
    '{22, -1, 46, -1, -1, 18, -1, -1},
    '{16, -1, -1, -1,  9, -1, -1, 49},
    '{-1, 49, -1, -1, -1, 59, -1, 41},
    '{-1, -1, -1, 43, 51, 38, -1, -1},
    '{-1, -1, 27, -1, -1, -1, 60,  7},
    '{-1, 12, -1, -1, 62, -1, 25, -1}
  };

  // Message: sign (1 = negative LLR, i.e. bit 1 more likely) and magnitude.
  localparam int MAG_W = 4;
  localparam int MAG_MAX = (1 << MAG_W) - 1;
  typedef logic [MAG_W-1:0] mag_t;
  typedef struct packed {
    logic sign;
    mag_t mag;
  } msg_t;

  // Derived tables, packed so they can be built by constant functions.
  typedef logic [MB-1:0][NB-1:0][4:0]    tab_bank_t;
  typedef logic [MB-1:0][DC_HD-1:0][2:0] tab_edge_t;

  // HD_BANK[br][bc]: index (0..23) of the non-zero block (br, bc), counted
  // row by row; 31 for a zero block.
  function automatic tab_bank_t mk_hd_bank();
    tab_bank_t tab = '0;
    int n = 0;
    for (int r = 0; r < MB; r++)
      for (int c = 0; c < NB; c++) begin
        tab[r][c] = (HD_SHIFT[r][c] >= 0) ? 5'(n) : 5'd31;
        if (HD_SHIFT[r][c] >= 0) n++;
      end
    return tab;
  endfunction

  // ROW_COL[br][k]: block column of the k-th non-zero block of block row br.
  function automatic tab_edge_t mk_row_col();
    tab_edge_t tab = '0;
    for (int r = 0; r < MB; r++) begin
      int n = 0;
      for (int c = 0; c < NB; c++)
        if (HD_SHIFT[r][c] >= 0) begin
          tab[r][n] = 3'(c);
          n++;
        end
    end
    return tab;
  endfunction

  // COL_ROW[bc][k]: block row of the k-th non-zero block of block column bc
  // (Hd is square in blocks, MB = NB).
  function automatic tab_edge_t mk_col_row();
    tab_edge_t tab = '0;
    for (int c = 0; c < NB; c++) begin
      int n = 0;
      for (int r = 0; r < MB; r++)
        if (HD_SHIFT[r][c] >= 0) begin
          tab[c][n] = 3'(r);
          n++;
        end
    end
    return tab;
  endfunction

  // HD_S[br][bc]: the shift as an address-width number (0 for zero blocks).
  typedef logic [MB-1:0][NB-1:0][AW-1:0] tab_shift_t;
  function automatic tab_shift_t mk_hd_s();
    tab_shift_t tab = '0;
    for (int r = 0; r < MB; r++)
      for (int c = 0; c < NB; c++)
        if (HD_SHIFT[r][c] >= 0) tab[r][c] = AW'(HD_SHIFT[r][c]);
    return tab;
  endfunction

  localparam tab_bank_t  HD_BANK = mk_hd_bank();
  localparam tab_shift_t HD_S    = mk_hd_s();
  localparam tab_edge_t ROW_COL = mk_row_col();
  localparam tab_edge_t COL_ROW = mk_col_row();

  // F function phi(x) = -ln(tanh(x/2)) on 4-bit magnitudes with LSB 0.25:
  // out = min(15, round(4 * phi(k / 4))), phi(0) saturated to 15.
  function automatic mag_t f_phi(input mag_t k);
    case (k)
      4'd0:                      return 4'd15;
      4'd1:                      return 4'd8;
      4'd2:                      return 4'd6;
      4'd3:                      return 4'd4;
      4'd4:                      return 4'd3;
      4'd5, 4'd6:                return 4'd2;
      4'd7, 4'd8, 4'd9,
      4'd10, 4'd11:              return 4'd1;
      default:                   return 4'd0;
    endcase
  endfunction

endpackage
